// ECDSA signature verification.
//
// Checks 1 <= r, s < n (rejecting at once otherwise), then forms
// w = s^-1 mod n on the modular inverter, u1 = z w mod n and u2 = r w mod n
// on the counter multiplier, and runs the two scalar multiplications u1 G and
// u2 Q at the same time on two point multipliers. Their sum is formed by the
// point adder, or by the point doubler when both products are the same point;
// a product equal to the point at infinity is skipped, and a sum at infinity
// (opposite points) rejects the signature. The signature is valid when the
// x coordinate of the sum, reduced mod n, equals r. Running the two scalar
// multiplications concurrently and the special-case handling of the final
// addition are this implementation's choices.
//
// Interface: all operands are sampled with the one-cycle start pulse; gx, gy,
// qx, qy and curve_a must be reduced mod p; p < 2n and z < 2n are assumed.
// done pulses for one cycle and valid holds until the next start.
// Timing: one inversion, two multiplications, one point multiplication (the
// two run in parallel) and one point addition or doubling.
module ecdsa_verify #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] z,
  input  logic [N-1:0] r,
  input  logic [N-1:0] s,
  input  logic [N-1:0] gx,
  input  logic [N-1:0] gy,
  input  logic [N-1:0] qx,
  input  logic [N-1:0] qy,
  input  logic [N-1:0] curve_a,
  input  logic [N-1:0] p,
  input  logic [N-1:0] n,
  output logic         busy,
  output logic         done,
  output logic         valid
);
  typedef enum logic [3:0] {
    S_IDLE, S_INV, S_MUL_U1, S_MUL_U2, S_PMUL, S_COMBINE, S_ADD, S_DBL, S_CMP
  } state_e;
  state_e state_q;

  logic [N-1:0] z_q, r_q, s_q, gx_q, gy_q, qx_q, qy_q, a_q, p_q, n_q;
  logic [N-1:0] w_q, u1_q, u2_q, x_sum_q;
  logic         g_done_q, q_done_q;
  logic         go_q;

  logic inv_done;
  logic [N-1:0] inv_z;
  mod_inv #(.N(N)) u_inv (
    .clk, .rst_n, .start(go_q && state_q == S_INV), .a(s_q), .m(n_q),
    .busy(), .done(inv_done), .z(inv_z)
  );

  logic [N-1:0] z_red;
  assign z_red = (z_q >= n_q) ? z_q - n_q : z_q;

  logic mul_done;
  logic [N-1:0] mul_y;
  mod_mult #(.N(N)) u_mult (
    .clk, .rst_n, .start(go_q && (state_q == S_MUL_U1 || state_q == S_MUL_U2)),
    .a(w_q), .b((state_q == S_MUL_U1) ? z_red : r_q), .m(n_q),
    .busy(), .done(mul_done), .y(mul_y)
  );

  logic pg_done, pq_done, pg_inf, pq_inf;
  logic [N-1:0] pg_x, pg_y, pq_x, pq_y;
  point_mult #(.N(N)) u_pmul_g (
    .clk, .rst_n, .start(go_q && state_q == S_PMUL), .k(u1_q), .px(gx_q), .py(gy_q),
    .curve_a(a_q), .p(p_q), .busy(), .done(pg_done), .qx(pg_x), .qy(pg_y), .inf(pg_inf)
  );
  point_mult #(.N(N)) u_pmul_q (
    .clk, .rst_n, .start(go_q && state_q == S_PMUL), .k(u2_q), .px(qx_q), .py(qy_q),
    .curve_a(a_q), .p(p_q), .busy(), .done(pq_done), .qx(pq_x), .qy(pq_y), .inf(pq_inf)
  );

  logic add_done, dbl_done;
  logic [N-1:0] add_x, add_y, dbl_x, dbl_y;
  point_add #(.N(N)) u_add (
    .clk, .rst_n, .start(go_q && state_q == S_ADD), .px(pg_x), .py(pg_y), .qx(pq_x), .qy(pq_y),
    .p(p_q), .busy(), .done(add_done), .rx(add_x), .ry(add_y)
  );
  point_double #(.N(N)) u_double (
    .clk, .rst_n, .start(go_q && state_q == S_DBL), .px(pg_x), .py(pg_y), .curve_a(a_q),
    .p(p_q), .busy(), .done(dbl_done), .rx(dbl_x), .ry(dbl_y)
  );

  logic in_range;
  assign in_range = (r != '0) && (r < n) && (s != '0) && (s < n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      go_q    <= 1'b0;
      z_q <= '0; r_q <= '0; s_q <= '0; gx_q <= '0; gy_q <= '0;
      qx_q <= '0; qy_q <= '0; a_q <= '0; p_q <= '0; n_q <= '0;
      w_q <= '0; u1_q <= '0; u2_q <= '0; x_sum_q <= '0;
      g_done_q <= 1'b0;
      q_done_q <= 1'b0;
      valid <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      go_q <= 1'b0;
      if (pg_done) g_done_q <= 1'b1;
      if (pq_done) q_done_q <= 1'b1;
      unique case (state_q)
        S_IDLE: if (start) begin
          z_q <= z; r_q <= r; s_q <= s; gx_q <= gx; gy_q <= gy;
          qx_q <= qx; qy_q <= qy; a_q <= curve_a; p_q <= p; n_q <= n;
          if (in_range) begin
            state_q <= S_INV;
            go_q    <= 1'b1;
          end else begin
            valid <= 1'b0;
            done  <= 1'b1;
          end
        end
        S_INV: if (inv_done) begin
          w_q     <= inv_z;
          state_q <= S_MUL_U1;
          go_q    <= 1'b1;
        end
        S_MUL_U1: if (mul_done) begin
          u1_q    <= mul_y;
          state_q <= S_MUL_U2;
          go_q    <= 1'b1;
        end
        S_MUL_U2: if (mul_done) begin
          u2_q     <= mul_y;
          g_done_q <= 1'b0;
          q_done_q <= 1'b0;
          state_q  <= S_PMUL;
          go_q     <= 1'b1;
        end
        S_PMUL: if (g_done_q && q_done_q) state_q <= S_COMBINE;
        S_COMBINE: begin
          if (pg_inf && pq_inf) begin
            valid   <= 1'b0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else if (pg_inf) begin
            x_sum_q <= pq_x;
            state_q <= S_CMP;
          end else if (pq_inf) begin
            x_sum_q <= pg_x;
            state_q <= S_CMP;
          end else if (pg_x != pq_x) begin
            state_q <= S_ADD;
            go_q    <= 1'b1;
          end else if (pg_y == pq_y && pg_y != '0) begin
            state_q <= S_DBL;
            go_q    <= 1'b1;
          end else begin                 // u1 G = -u2 Q: sum at infinity
            valid   <= 1'b0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        S_ADD: if (add_done) begin x_sum_q <= add_x; state_q <= S_CMP; end
        S_DBL: if (dbl_done) begin x_sum_q <= dbl_x; state_q <= S_CMP; end
        S_CMP: begin
          valid   <= (((x_sum_q >= n_q) ? x_sum_q - n_q : x_sum_q) == r_q);
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
