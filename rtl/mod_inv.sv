// Modular inverter: z = a^-1 mod m by the extended Euclidean algorithm.
//
// Registers A and B start as m and a; the coefficient registers start as
// 0 and 1. Each iteration divides A by B on the bit-serial divider (quotient
// q and remainder r), forms t = P_prev - q * P (mod m) with the counter
// multiplier and a modular subtractor, and shifts the pairs along:
// A <- B, B <- r, P_prev <- P, P <- t. Every coefficient satisfies
// remainder = coefficient * a (mod m), so the iteration whose remainder is 1
// yields the inverse, which is loaded into the output register Z. A remainder
// of 0 before that means gcd(a, m) != 1 and Z is 0.
//
// Interface: a (below m) and m are sampled with the one-cycle start pulse;
// done pulses for one cycle with z valid, and z holds until the next start.
// a = 0 gives z = 0, a = 1 gives z = 1 right away.
// Timing: each Euclid step takes N+1 divider cycles, N+1 multiplier cycles
// and three control cycles, about 2N+5 cycles; a 256-bit inverse needs about
// 150 steps on average. The divider-multiplier-subtractor datapath follows the
// published architecture; skipping the multiplication when r = 0 and the
// handling of a = 0 and a = 1 are this implementation's choices.
module mod_inv #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] z
);
  typedef enum logic [2:0] {S_IDLE, S_DIV, S_DIV_WAIT, S_MUL_WAIT, S_UPDATE} state_e;
  state_e state_q;

  logic [N-1:0] m_q;
  logic [N-1:0] ra_q, rb_q;       // Reg A, Reg B (Euclid remainders)
  logic [N-1:0] rem_q;            // Reg r (Reg q is the divider's q output)
  logic [N-1:0] p_prev_q, p_q;    // P[ctr], P[ctr+1] (coefficients mod m)
  logic [N-1:0] prod_q;           // Reg R = q * P mod m

  logic         div_start, div_done, mul_start, mul_done;
  logic [N-1:0] div_q, div_r, mul_y, t_new;

  int_divider #(.N(N)) u_div (
    .clk, .rst_n, .start(div_start), .x(ra_q), .y(rb_q),
    .busy(), .done(div_done), .q(div_q), .r(div_r)
  );

  mod_mult #(.N(N)) u_mult (
    .clk, .rst_n, .start(mul_start), .a(p_q), .b(div_q), .m(m_q),
    .busy(), .done(mul_done), .y(mul_y)
  );

  mod_sub #(.N(N)) u_sub (.a(p_prev_q), .b(prod_q), .m(m_q), .y(t_new));

  assign div_start = (state_q == S_DIV);
  assign mul_start = (state_q == S_DIV_WAIT) && div_done && (div_r != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      m_q      <= '0;
      ra_q     <= '0;
      rb_q     <= '0;
      rem_q    <= '0;
      p_prev_q <= '0;
      p_q      <= '0;
      prod_q   <= '0;
      z        <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          m_q      <= m;
          ra_q     <= m;
          rb_q     <= a;
          p_prev_q <= '0;
          p_q      <= N'(1);
          if (a <= N'(1)) begin
            z    <= a;
            done <= 1'b1;
          end else begin
            state_q <= S_DIV;
          end
        end
        S_DIV: state_q <= S_DIV_WAIT;
        S_DIV_WAIT: if (div_done) begin
          rem_q <= div_r;
          if (div_r == '0) begin
            z       <= '0;           // no inverse: gcd(a, m) != 1
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_MUL_WAIT;
          end
        end
        S_MUL_WAIT: if (mul_done) begin
          prod_q  <= mul_y;
          state_q <= S_UPDATE;
        end
        S_UPDATE: begin
          if (rem_q == N'(1)) begin
            z       <= t_new;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            ra_q     <= rb_q;
            rb_q     <= rem_q;
            p_prev_q <= p_q;
            p_q      <= t_new;
            state_q  <= S_DIV;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
