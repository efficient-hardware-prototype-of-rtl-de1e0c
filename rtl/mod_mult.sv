// Counter-driven modular multiplier: y = a * b mod m.
//
// The multiplier B is scanned one bit per clock under the control of an
// iteration counter, most significant bit first (Horner's rule). Each
// iteration doubles the accumulator F and, when the current bit of B is 1,
// adds the multiplicand A. After every doubling and every addition the
// accumulator is brought back below m by one conditional subtraction, so it
// never grows past N+1 bits; this interleaved reduction is what lets the
// "subtract q until below q" step finish in one subtraction. When the counter
// reaches N the accumulator is copied into register G, and one output cycle
// applies the final "value >= m ? value - m : value" correction.
//
// Interface: operands are sampled with the one-cycle start pulse; a must be
// below m, b may be any N-bit value, m must be non-zero. done pulses for one
// cycle with y valid; y holds until the next start. Squaring is the same unit
// with a = b.
//
// Timing: start in cycle 0, N iteration cycles, y valid and done high N+1
// cycles after start, the N+1-cycle latency the design is built around.
// The counter, shift/add/mux structure and output correction follow the
// published datapath; the per-step reduction and MSB-first bit order are this
// implementation's reading of it.
module mod_mult #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] y
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  a_q, b_q, m_q;   // Reg E holds A; B and q held for the run
  logic [N-1:0]  f_q;             // Reg F, the accumulator
  logic [CW-1:0] ctr_q;           // Reg ctr
  logic          run_q;

  // One iteration: F <- 2F mod m, then + A mod m if B[N-1-ctr] is set.
  logic [N:0]   dbl, dbl_red, sum, sum_red;
  logic [N-1:0] f_next;
  logic         bit_sel;
  always_comb begin
    dbl     = {f_q, 1'b0};
    dbl_red = (dbl >= {1'b0, m_q}) ? dbl - {1'b0, m_q} : dbl;
    sum     = dbl_red + {1'b0, a_q};
    sum_red = (sum >= {1'b0, m_q}) ? sum - {1'b0, m_q} : sum;
    bit_sel = b_q[N-1];
    f_next  = bit_sel ? sum_red[N-1:0] : dbl_red[N-1:0];
  end

  // Output stage: Reg G and the final conditional subtraction.
  logic [N-1:0] g_corr;
  always_comb g_corr = (f_q >= m_q) ? f_q - m_q : f_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      m_q   <= '0;
      f_q   <= '0;
      ctr_q <= '0;
      run_q <= 1'b0;
      done  <= 1'b0;
      y     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q   <= a;
        b_q   <= b;
        m_q   <= m;
        f_q   <= '0;
        ctr_q <= '0;
        run_q <= 1'b1;
      end else if (run_q) begin
        if (ctr_q < CW'(N)) begin
          f_q   <= f_next;
          b_q   <= {b_q[N-2:0], 1'b0};
          ctr_q <= ctr_q + 1'b1;
        end else begin
          y     <= g_corr;
          done  <= 1'b1;
          run_q <= 1'b0;
        end
      end
    end
  end

  assign busy = run_q;

  // A new operation may only be started while the unit is idle.
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !run_q);
endmodule
