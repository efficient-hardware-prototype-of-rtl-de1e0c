// Full-size run of the ECDSA engine with every parameter at its default
// (256 bits) on the secp256k1 curve: one signature with a random private key,
// nonce and hash, compared with the reference, followed by verification of
// that signature, which must pass (rejection of changed messages is covered
// by tb_ecdsa_top at a smaller width). Prints the cycle count of each
// operation; the run takes several minutes.
module tb_ecdsa_full;
  import ecc_ref_pkg::*;
  import ecdsa_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  ecdsa_mode_e mode;
  u256 z, d, k, qx, qy, r_in, s_in, r_out, s_out;
  logic busy, done, sig_ok, verify_ok;
  longint cyc;
  always #5 clk = ~clk;

  ecdsa_top u_dut (
    .clk, .rst_n, .start, .mode, .curve_a('0), .p(K1_P), .n(K1_N),
    .gx(K1_GX), .gy(K1_GY), .z, .d, .k, .qx, .qy, .r_in, .s_in,
    .busy, .done, .r_out, .s_out, .sig_ok, .verify_ok
  );

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(ecdsa_mode_e m);
    @(negedge clk);
    mode = m; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("%s took %0d cycles", m.name(), cyc);
  endtask

  initial begin
    pt_t G, Q, R;
    u256 er, es;
    G = mk_pt(K1_GX, K1_GY);
    mode = MODE_SIGN;
    d = rand256() % K1_N;
    k = rand256() % K1_N;
    z = rand256();
    if (d == '0) d = 256'd1;
    if (k == '0) k = 256'd1;
    Q = pt_mul(d, G, '0, K1_P);
    qx = Q.x; qy = Q.y;
    r_in = '0; s_in = '0;
    R  = pt_mul(k, G, '0, K1_P);
    er = R.x % K1_N;
    es = mulmod(invmod(k, K1_N), addmod(z % K1_N, mulmod(d, er, K1_N), K1_N), K1_N);
    repeat (3) @(negedge clk);
    rst_n = 1;

    op(MODE_SIGN);
    check("r", r_out, er);
    check("s", s_out, es);
    check("sig_ok", 256'(sig_ok), 256'd1);

    r_in = r_out; s_in = s_out;
    op(MODE_VERIFY);
    check("signature accepted", 256'(verify_ok), 256'd1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
