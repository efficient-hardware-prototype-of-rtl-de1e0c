// Affine elliptic-curve point addition: (rx, ry) = (px, py) + (qx, qy) over GF(p).
//
// Follows the published operation sequence: the two subtractors form
// slope_x = qx - px and slope_y = qy - py, the inverter turns slope_x into
// 1/slope_x, a multiplier gives the slope m = slope_y / slope_x, the squarer
// gives m^2, two subtractors give rx = m^2 - px - qx (Reg X), and a second
// multiplier and subtractor give ry = m (px - rx) - py (Reg Y). One inverter
// and three counter multipliers (slope, squaring, y) are instantiated, one per
// box of the datapath; they run one after another.
//
// Interface: operands are sampled with the one-cycle start pulse and must be
// reduced mod p. The points must differ and must not be each other's
// negation (the caller handles those cases). done pulses for one cycle with
// rx, ry valid; they hold until the next start.
// Timing: one inversion plus three multiplications of N+1 cycles each plus
// a few control cycles.
module point_add #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] px,
  input  logic [N-1:0] py,
  input  logic [N-1:0] qx,
  input  logic [N-1:0] qy,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] rx,
  output logic [N-1:0] ry
);
  typedef enum logic [2:0] {S_IDLE, S_DIFF, S_INV, S_SLOPE, S_SQUARE, S_X, S_YMUL, S_Y} state_e;
  state_e state_q;

  logic [N-1:0] px_q, py_q, qx_q, qy_q, p_q;
  logic [N-1:0] sx_q, sy_q;       // slope_x, slope_y
  logic [N-1:0] slope_q, m2_q, e_q;

  logic [N-1:0] sx, sy, x_tmp, x_new, dx, y_new;
  mod_sub #(.N(N)) u_sub_x  (.a(qx_q),  .b(px_q), .m(p_q), .y(sx));
  mod_sub #(.N(N)) u_sub_y  (.a(qy_q),  .b(py_q), .m(p_q), .y(sy));
  mod_sub #(.N(N)) u_sub_x1 (.a(m2_q),  .b(px_q), .m(p_q), .y(x_tmp));
  mod_sub #(.N(N)) u_sub_x2 (.a(x_tmp), .b(qx_q), .m(p_q), .y(x_new));
  mod_sub #(.N(N)) u_sub_dx (.a(px_q),  .b(rx),   .m(p_q), .y(dx));
  mod_sub #(.N(N)) u_sub_yo (.a(e_q),   .b(py_q), .m(p_q), .y(y_new));

  logic inv_start, inv_done;
  logic [N-1:0] inv_z;
  mod_inv #(.N(N)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(sx_q), .m(p_q),
    .busy(), .done(inv_done), .z(inv_z)
  );

  logic sl_start, sl_done, sq_start, sq_done, ym_start, ym_done;
  logic [N-1:0] sl_y, sq_y, ym_y;
  mod_mult #(.N(N)) u_mul_slope (
    .clk, .rst_n, .start(sl_start), .a(inv_z), .b(sy_q), .m(p_q),
    .busy(), .done(sl_done), .y(sl_y)
  );
  mod_mult #(.N(N)) u_square (
    .clk, .rst_n, .start(sq_start), .a(slope_q), .b(slope_q), .m(p_q),
    .busy(), .done(sq_done), .y(sq_y)
  );
  mod_mult #(.N(N)) u_mul_y (
    .clk, .rst_n, .start(ym_start), .a(slope_q), .b(dx), .m(p_q),
    .busy(), .done(ym_done), .y(ym_y)
  );

  logic go_q;  // one-cycle pulse on entry to a state that launches a unit
  assign inv_start = go_q && (state_q == S_INV);
  assign sl_start  = go_q && (state_q == S_SLOPE);
  assign sq_start  = go_q && (state_q == S_SQUARE);
  assign ym_start  = go_q && (state_q == S_YMUL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      go_q    <= 1'b0;
      px_q <= '0; py_q <= '0; qx_q <= '0; qy_q <= '0; p_q <= '0;
      sx_q <= '0; sy_q <= '0; slope_q <= '0; m2_q <= '0; e_q <= '0;
      rx   <= '0;
      ry   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      go_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          px_q <= px; py_q <= py; qx_q <= qx; qy_q <= qy; p_q <= p;
          state_q <= S_DIFF;
        end
        S_DIFF: begin
          sx_q    <= sx;
          sy_q    <= sy;
          state_q <= S_INV;
          go_q    <= 1'b1;
        end
        S_X: begin
          rx      <= x_new;   // Reg X
          state_q <= S_YMUL;
          go_q    <= 1'b1;
        end
        S_INV:    if (inv_done) begin state_q <= S_SLOPE;  go_q <= 1'b1; end
        S_SLOPE:  if (sl_done)  begin slope_q <= sl_y; state_q <= S_SQUARE; go_q <= 1'b1; end
        S_SQUARE: if (sq_done)  begin m2_q <= sq_y; state_q <= S_X; end
        S_YMUL:   if (ym_done)  begin e_q <= ym_y; state_q <= S_Y; end
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
