// ECDSA signature generation: r = x(kG) mod n, s = k^-1 (z + d r) mod n.
//
// The point multiplier, started with the block, computes kG over GF(p); x1 is
// then reduced mod n by one conditional subtraction to give r. The modular
// inverter (mod n) forms k^-1, the counter multiplier forms d r mod n, a
// modular adder adds the hash z (reduced by one conditional subtraction), and
// the multiplier forms s = k^-1 (z + d r) mod n. One multiplier and one
// inverter serve all scalar steps. ok is low when r or s is zero; the caller
// must then retry with a fresh nonce k. The hash and the nonce come from
// outside the block.
//
// Interface: all operands are sampled with the one-cycle start pulse.
// 1 <= k < n and d < n are required; p < 2n and z < 2n are assumed so that a
// single subtraction reduces x1 and z mod n (true for 256-bit curves of
// cofactor 1). done pulses for one cycle; r, s, ok hold until the next start.
// Timing: one point multiplication, one inversion and two multiplications.
module ecdsa_sign #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] z,
  input  logic [N-1:0] d,
  input  logic [N-1:0] k,
  input  logic [N-1:0] gx,
  input  logic [N-1:0] gy,
  input  logic [N-1:0] curve_a,
  input  logic [N-1:0] p,
  input  logic [N-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] r,
  output logic [N-1:0] s,
  output logic         ok
);
  typedef enum logic [2:0] {S_IDLE, S_PMUL, S_INV, S_MUL_DR, S_MUL_S, S_OUT} state_e;
  state_e state_q;

  logic [N-1:0] z_q, d_q, k_q, n_q, kinv_q, sum_q;
  logic go_q;

  logic pm_done, pm_inf;
  logic [N-1:0] pm_x, pm_y;
  point_mult #(.N(N)) u_pmul (
    .clk, .rst_n, .start(start && state_q == S_IDLE), .k(k), .px(gx), .py(gy),
    .curve_a, .p, .busy(), .done(pm_done), .qx(pm_x), .qy(pm_y), .inf(pm_inf)
  );

  logic inv_done;
  logic [N-1:0] inv_z;
  mod_inv #(.N(N)) u_inv (
    .clk, .rst_n, .start(go_q && state_q == S_INV), .a(k_q), .m(n_q),
    .busy(), .done(inv_done), .z(inv_z)
  );

  logic         mul_start, mul_done;
  logic [N-1:0] mul_a, mul_b, mul_y;
  assign mul_start = go_q && (state_q == S_MUL_DR || state_q == S_MUL_S);
  assign mul_a     = (state_q == S_MUL_DR) ? d_q : kinv_q;
  assign mul_b     = (state_q == S_MUL_DR) ? r   : sum_q;
  mod_mult #(.N(N)) u_mult (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b), .m(n_q),
    .busy(), .done(mul_done), .y(mul_y)
  );

  logic [N-1:0] z_red, sum;
  assign z_red = (z_q >= n_q) ? z_q - n_q : z_q;
  mod_add #(.N(N)) u_add (.a(z_red), .b(mul_y), .m(n_q), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      go_q    <= 1'b0;
      z_q <= '0; d_q <= '0; k_q <= '0; n_q <= '0; kinv_q <= '0; sum_q <= '0;
      r    <= '0;
      s    <= '0;
      ok   <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      go_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          z_q <= z; d_q <= d; k_q <= k; n_q <= n;
          state_q <= S_PMUL;
        end
        S_PMUL: if (pm_done) begin
          r       <= (pm_x >= n_q) ? pm_x - n_q : pm_x;   // r = x1 mod n
          state_q <= S_INV;
          go_q    <= 1'b1;
        end
        S_INV: if (inv_done) begin
          kinv_q  <= inv_z;
          state_q <= S_MUL_DR;
          go_q    <= 1'b1;
        end
        S_MUL_DR: if (mul_done) begin
          sum_q   <= sum;          // z + d r mod n
          state_q <= S_MUL_S;
          go_q    <= 1'b1;
        end
        S_MUL_S: if (mul_done) begin
          s       <= mul_y;
          state_q <= S_OUT;
        end
        S_OUT: begin
          ok      <= (r != '0) && (s != '0) && !pm_inf;
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
