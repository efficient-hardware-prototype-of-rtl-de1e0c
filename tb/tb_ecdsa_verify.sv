// Self-checking test of ECDSA signature verification on the 16-bit test
// curve. Signatures are made by the reference; the verifier must accept them
// and reject ones with a changed hash, a changed s, r or s out of [1, n-1],
// or a wrong public key. Special cases of the final point addition are
// provoked on purpose: z = 0 (u1 G at infinity), z = r d (u1 G = u2 Q, so
// the doubler runs) and z = -r d (sum at infinity).
module tb_ecdsa_verify;
  import ecc_ref_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] z, r, s, qx, qy;
  logic busy, done, valid;
  always #5 clk = ~clk;

  ecdsa_verify #(.N(N)) u_dut (.clk, .rst_n, .start, .z, .r, .s,
                               .gx(N'(C16_GX)), .gy(N'(C16_GY)), .qx, .qy,
                               .curve_a(N'(C16_A)), .p(N'(C16_P)), .n(N'(C16_N)),
                               .busy, .done, .valid);

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(string what, u256 tz, u256 tr, u256 ts, pt_t Q, bit exp);
    @(negedge clk);
    z = N'(tz); r = N'(tr); s = N'(ts); qx = N'(Q.x); qy = N'(Q.y); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(what, 256'(valid), 256'(exp));
  endtask

  // Reference signature; returns 0 if r or s came out zero.
  function automatic bit sign(u256 tz, u256 td, u256 tk, output u256 er, output u256 es);
    pt_t R = pt_mul(tk, mk_pt(C16_GX, C16_GY), C16_A, C16_P);
    er = R.x % C16_N;
    es = mulmod(invmod(tk, C16_N), addmod(tz % C16_N, mulmod(td, er, C16_N), C16_N), C16_N);
    return er != '0 && es != '0;
  endfunction

  initial begin
    pt_t G, Q, Q2;
    u256 td, tk, tz, er, es;
    G = mk_pt(C16_GX, C16_GY);
    z = '0; r = '0; s = '0; qx = '0; qy = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      td = 256'($urandom_range(65286, 1));
      tk = 256'($urandom_range(65286, 1));
      tz = 256'($urandom_range(65535, 0));
      Q  = pt_mul(td, G, C16_A, C16_P);
      Q2 = pt_mul(td + 1, G, C16_A, C16_P);
      if (!sign(tz, td, tk, er, es)) continue;
      run("valid signature", tz, er, es, Q, 1'b1);
      run("changed hash", (tz + 1) % 65536, er, es, Q, (tz + 1) % 65536 % C16_N == tz % C16_N);
      run("changed s", tz, er, (es % (C16_N - 1)) + 1, Q, 1'b0);
      run("wrong key", tz, er, es, Q2, 1'b0);
      run("r = 0", tz, '0, es, Q, 1'b0);
      run("s = n", tz, er, C16_N, Q, 1'b0);
      // z = 0: u1 = 0, the G product is the point at infinity.
      if (sign(0, td, tk, er, es)) run("z = 0", 0, er, es, Q, 1'b1);
      // z = r d: u1 G = u2 Q, the sum needs the doubler.
      tz = mulmod(er, td, C16_N);
      if (sign(tz, td, tk, er, es)) run("z = r d", tz, er, es, Q, 1'b1);
      // z = -r d: u1 G = -u2 Q, the sum is the point at infinity.
      tz = (C16_N - mulmod(er, td, C16_N)) % C16_N;
      run("z = -r d", tz, er, 256'd1234, Q, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
