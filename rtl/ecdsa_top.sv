// ECDSA engine: signature generation and verification over any
// short-Weierstrass curve y^2 = x^3 + a x + b over GF(p) with a base point G
// of prime order n, all given at run time.
//
// The engine holds a signer and a verifier side by side. A one-cycle start
// pulse launches the one selected by mode (MODE_SIGN or MODE_VERIFY, from
// ecdsa_pkg); busy stays high until the selected unit finishes and done
// pulses for one cycle. The signer returns (r, s) and sig_ok (both non-zero;
// otherwise retry with a new nonce k), the verifier returns verify_ok. Both
// are built from the same arithmetic: the counter-driven modular multiplier,
// the extended-Euclid modular inverter, affine point addition and doubling,
// and double-and-add point multiplication. The message hash z and the nonce k
// are produced outside the engine.
//
// Interface: every operand is sampled with start; results hold until the
// next operation of the same kind. start is ignored while busy.
// Timing: a signature takes one point multiplication, a verification one
// point multiplication (its two scalar products run in parallel) plus one
// point addition; each point operation is dominated by one modular inversion.
module ecdsa_top
  import ecdsa_pkg::*;
#(
  parameter int unsigned N = ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  ecdsa_mode_e  mode,
  input  logic [N-1:0] curve_a,
  input  logic [N-1:0] p,
  input  logic [N-1:0] n,
  input  logic [N-1:0] gx,
  input  logic [N-1:0] gy,
  input  logic [N-1:0] z,
  input  logic [N-1:0] d,
  input  logic [N-1:0] k,
  input  logic [N-1:0] qx,
  input  logic [N-1:0] qy,
  input  logic [N-1:0] r_in,
  input  logic [N-1:0] s_in,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] r_out,
  output logic [N-1:0] s_out,
  output logic         sig_ok,
  output logic         verify_ok
);
  logic sign_busy, sign_done, ver_busy, ver_done;
  logic sign_start, ver_start;

  assign sign_start = start && !busy && (mode == MODE_SIGN);
  assign ver_start  = start && !busy && (mode == MODE_VERIFY);

  ecdsa_sign #(.N(N)) u_sign (
    .clk, .rst_n, .start(sign_start), .z, .d, .k, .gx, .gy, .curve_a, .p, .n,
    .busy(sign_busy), .done(sign_done), .r(r_out), .s(s_out), .ok(sig_ok)
  );

  ecdsa_verify #(.N(N)) u_verify (
    .clk, .rst_n, .start(ver_start), .z, .r(r_in), .s(s_in), .gx, .gy, .qx, .qy,
    .curve_a, .p, .n, .busy(ver_busy), .done(ver_done), .valid(verify_ok)
  );

  assign busy = sign_busy || ver_busy;
  assign done = sign_done || ver_done;
endmodule
