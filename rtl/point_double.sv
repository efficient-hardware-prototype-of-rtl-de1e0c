// Affine elliptic-curve point doubling: (rx, ry) = 2 (px, py) over GF(p).
//
// Slope m = (3 px^2 + a) / (2 py). Two branches start together: a squarer
// forms px^2 and is followed by a counter multiplier with the constant 3 and
// a modular adder that adds the curve coefficient a; in parallel a modular
// adder forms 2 py and the inverter turns it into 1/(2 py). A multiplier
// joins the branches into m. A second squarer gives m^2, an adder 2 px and a
// subtractor rx = m^2 - 2 px (Reg X); a subtractor, a multiplier and a
// subtractor give ry = m (px - rx) - py (Reg Y). The published datapath has no
// input for a (it fits a = 0 curves such as the blockchain curve secp256k1);
// the adder for a is included here so that any curve works, as the slope
// formula requires.
//
// Interface: operands are sampled with the one-cycle start pulse and must be
// reduced mod p; py must be non-zero. done pulses for one cycle with rx, ry
// valid; they hold until the next start.
// Timing: max(inversion, two multiplications) + three multiplications of N+1
// cycles each, plus a few control cycles.
module point_double #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] px,
  input  logic [N-1:0] py,
  input  logic [N-1:0] curve_a,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] rx,
  output logic [N-1:0] ry
);
  typedef enum logic [2:0] {S_IDLE, S_SQX, S_MUL3, S_JOIN, S_SLOPE, S_SQM, S_YMUL, S_Y} state_e;
  state_e state_q;

  logic [N-1:0] px_q, py_q, a_q, p_q;
  logic [N-1:0] num_q, inv_q, slope_q, e_q;
  logic         inv_ready_q;

  logic [N-1:0] two_y, num, two_x, x_new, dx, y_new;
  mod_add #(.N(N)) u_add_y  (.a(py_q), .b(py_q), .m(p_q), .y(two_y));
  mod_add #(.N(N)) u_add_x  (.a(px_q), .b(px_q), .m(p_q), .y(two_x));

  logic inv_start, inv_done;
  logic [N-1:0] inv_z;
  mod_inv #(.N(N)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(two_y), .m(p_q),
    .busy(), .done(inv_done), .z(inv_z)
  );

  logic sqx_start, sqx_done, m3_start, m3_done, sl_start, sl_done;
  logic sqm_start, sqm_done, ym_start, ym_done;
  logic [N-1:0] sqx_y, m3_y, sl_y, sqm_y, ym_y;
  mod_mult #(.N(N)) u_square_x (
    .clk, .rst_n, .start(sqx_start), .a(px_q), .b(px_q), .m(p_q),
    .busy(), .done(sqx_done), .y(sqx_y)
  );
  mod_mult #(.N(N)) u_mul3 (
    .clk, .rst_n, .start(m3_start), .a(sqx_y), .b(N'(3)), .m(p_q),
    .busy(), .done(m3_done), .y(m3_y)
  );
  mod_add #(.N(N)) u_add_a  (.a(m3_y), .b(a_q), .m(p_q), .y(num));
  mod_mult #(.N(N)) u_mul_slope (
    .clk, .rst_n, .start(sl_start), .a(num_q), .b(inv_q), .m(p_q),
    .busy(), .done(sl_done), .y(sl_y)
  );
  mod_mult #(.N(N)) u_square_m (
    .clk, .rst_n, .start(sqm_start), .a(slope_q), .b(slope_q), .m(p_q),
    .busy(), .done(sqm_done), .y(sqm_y)
  );
  mod_sub #(.N(N)) u_sub_x  (.a(sqm_y), .b(two_x), .m(p_q), .y(x_new));
  mod_sub #(.N(N)) u_sub_dx (.a(px_q), .b(rx), .m(p_q), .y(dx));
  mod_mult #(.N(N)) u_mul_y (
    .clk, .rst_n, .start(ym_start), .a(slope_q), .b(dx), .m(p_q),
    .busy(), .done(ym_done), .y(ym_y)
  );
  mod_sub #(.N(N)) u_sub_y  (.a(e_q),  .b(py_q), .m(p_q), .y(y_new));

  logic go_q;  // one-cycle pulse on entry to a state that launches a unit
  assign sqx_start = go_q && (state_q == S_SQX);
  assign inv_start = go_q && (state_q == S_SQX);
  assign m3_start  = go_q && (state_q == S_MUL3);
  assign sl_start  = go_q && (state_q == S_SLOPE);
  assign sqm_start = go_q && (state_q == S_SQM);
  assign ym_start  = go_q && (state_q == S_YMUL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      go_q        <= 1'b0;
      px_q <= '0; py_q <= '0; a_q <= '0; p_q <= '0;
      num_q <= '0; inv_q <= '0; slope_q <= '0; e_q <= '0;
      inv_ready_q <= 1'b0;
      rx   <= '0;
      ry   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      go_q <= 1'b0;
      if (inv_done) begin
        inv_q       <= inv_z;
        inv_ready_q <= 1'b1;
      end
      unique case (state_q)
        S_IDLE: if (start) begin
          px_q <= px; py_q <= py; a_q <= curve_a; p_q <= p;
          inv_ready_q <= 1'b0;
          state_q <= S_SQX;
          go_q    <= 1'b1;
        end
        S_SQX:  if (sqx_done) begin state_q <= S_MUL3; go_q <= 1'b1; end
        S_MUL3: if (m3_done) begin num_q <= num; state_q <= S_JOIN; end
        S_JOIN: if (inv_ready_q) begin state_q <= S_SLOPE; go_q <= 1'b1; end
        S_SLOPE: if (sl_done) begin slope_q <= sl_y; state_q <= S_SQM; go_q <= 1'b1; end
        S_SQM: if (sqm_done) begin
          rx      <= x_new;   // Reg X
          state_q <= S_YMUL;
          go_q    <= 1'b1;
        end
        S_YMUL: if (ym_done) begin e_q <= ym_y; state_q <= S_Y; end
        S_Y: begin
          ry      <= y_new;   // Reg Y
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
