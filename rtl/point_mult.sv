// Scalar point multiplication (qx, qy) = k (px, py) by left-to-right double and add.
//
// Register R holds the running point. Leading zero bits of k are skipped one
// per clock; at the most significant set bit R is loaded with P. For every
// lower bit, from the top down to bit 0, R is doubled and, when the bit is 1,
// P is added to it. The loop ends when the bit counter has passed bit 0.
// One point doubler and one point adder are instantiated. Without a point at
// infinity inside the loop, R = jP with 1 <= j < k, so the adder never sees
// equal or opposite points as long as 1 <= k < n on a curve of prime order n.
// The double-and-add loop follows the published algorithm; skipping leading
// zeros (the algorithm assumes bit N-1 of k is set) is this implementation's
// addition.
//
// Interface: operands are sampled with the one-cycle start pulse; px, py and
// curve_a must be reduced mod p. done pulses for one cycle; qx, qy, inf hold
// until the next start. k = 0 gives inf = 1 (the point at infinity) and
// qx = qy = 0.
// Timing: about (bit length of k - 1) doublings plus (number of ones in k - 1)
// additions, each dominated by one modular inversion.
module point_mult #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] k,
  input  logic [N-1:0] px,
  input  logic [N-1:0] py,
  input  logic [N-1:0] curve_a,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] qx,
  output logic [N-1:0] qy,
  output logic         inf
);
  localparam int unsigned IW = $clog2(N + 1);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_DBL, S_DBL_WAIT, S_ADD_WAIT, S_NEXT} state_e;
  state_e state_q;

  logic [N-1:0]  k_q, px_q, py_q, a_q, p_q;
  logic [N-1:0]  rx_q, ry_q;      // Reg R_x, Reg R_y
  logic [IW-1:0] i_q;             // index of the bit being processed

  logic dbl_start, dbl_done, add_start, add_done;
  logic [N-1:0] dbl_x, dbl_y, add_x, add_y;

  point_double #(.N(N)) u_double (
    .clk, .rst_n, .start(dbl_start), .px(rx_q), .py(ry_q), .curve_a(a_q), .p(p_q),
    .busy(), .done(dbl_done), .rx(dbl_x), .ry(dbl_y)
  );
  point_add #(.N(N)) u_add (
    .clk, .rst_n, .start(add_start), .px(dbl_x), .py(dbl_y), .qx(px_q), .qy(py_q), .p(p_q),
    .busy(), .done(add_done), .rx(add_x), .ry(add_y)
  );

  logic cur_bit;
  assign cur_bit   = k_q[i_q[$clog2(N)-1:0]];
  assign dbl_start = (state_q == S_DBL);
  assign add_start = (state_q == S_DBL_WAIT) && dbl_done && cur_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      k_q <= '0; px_q <= '0; py_q <= '0; a_q <= '0; p_q <= '0;
      rx_q <= '0; ry_q <= '0;
      i_q  <= '0;
      qx   <= '0;
      qy   <= '0;
      inf  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          k_q <= k; px_q <= px; py_q <= py; a_q <= curve_a; p_q <= p;
          i_q <= IW'(N - 1);
          if (k == '0) begin
            qx   <= '0;
            qy   <= '0;
            inf  <= 1'b1;
            done <= 1'b1;
          end else begin
            state_q <= S_SCAN;
          end
        end
        // Find the leading one of k; R <- P there (the i == N-1 load of the loop).
        S_SCAN: if (cur_bit) begin
          rx_q <= px_q;
          ry_q <= py_q;
          state_q <= S_NEXT;
        end else begin
          i_q <= i_q - 1'b1;
        end
        S_NEXT: if (i_q == '0) begin
          qx   <= rx_q;
          qy   <= ry_q;
          inf  <= 1'b0;
          done <= 1'b1;
          state_q <= S_IDLE;
        end else begin
          i_q     <= i_q - 1'b1;
          state_q <= S_DBL;
        end
        S_DBL: state_q <= S_DBL_WAIT;
        S_DBL_WAIT: if (dbl_done) begin
          if (cur_bit) begin
            state_q <= S_ADD_WAIT;
          end else begin
            rx_q <= dbl_x;
            ry_q <= dbl_y;
            state_q <= S_NEXT;
          end
        end
        S_ADD_WAIT: if (add_done) begin
          rx_q <= add_x;
          ry_q <= add_y;
          state_q <= S_NEXT;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
