// End-to-end test of the ECDSA engine on the 16-bit test curve: the engine
// signs random messages in MODE_SIGN, then verifies its own signatures in
// MODE_VERIFY, and must reject changed messages, out-of-range signatures and
// a forged signature whose verification sum is the point at infinity.
// Signatures are also compared with the reference. Every mechanism of the
// design is counted and must occur at least once: the sign/verify mode
// switch, the retry flag (s = 0), the leading-zero skip of the scalar, point
// additions and doublings inside the scalar loop, the range-check rejection,
// a product at infinity, the doubling path and the infinity path of the
// final addition.
module tb_ecdsa_top;
  import ecc_ref_pkg::*;
  import ecdsa_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  ecdsa_mode_e mode;
  logic [N-1:0] z, d, k, qx, qy, r_in, s_in, r_out, s_out;
  logic busy, done, sig_ok, verify_ok;
  always #5 clk = ~clk;

  ecdsa_top #(.N(N)) u_dut (
    .clk, .rst_n, .start, .mode, .curve_a(N'(C16_A)), .p(N'(C16_P)), .n(N'(C16_N)),
    .gx(N'(C16_GX)), .gy(N'(C16_GY)), .z, .d, .k, .qx, .qy, .r_in, .s_in,
    .busy, .done, .r_out, .s_out, .sig_ok, .verify_ok
  );

  // Mechanism counters, observed inside the engine.
  int n_mode_switch = 0, n_retry = 0, n_scan_skip = 0, n_loop_add = 0, n_loop_dbl = 0;
  int n_range_reject = 0, n_inf_product = 0, n_final_dbl = 0, n_final_add = 0, n_inf_sum = 0;
  ecdsa_mode_e last_mode = MODE_SIGN;
  string vstate_prev = "";

  always @(posedge clk) if (rst_n) begin
    if (u_dut.u_sign.u_pmul.state_q.name() == "S_SCAN" && !u_dut.u_sign.u_pmul.cur_bit) n_scan_skip++;
    if (u_dut.u_sign.u_pmul.u_add.done)    n_loop_add++;
    if (u_dut.u_sign.u_pmul.u_double.done) n_loop_dbl++;
    if (u_dut.u_verify.u_double.done)      n_final_dbl++;
    if (u_dut.u_verify.u_add.done)         n_final_add++;
    if ((u_dut.u_verify.u_pmul_g.done && u_dut.u_verify.u_pmul_g.inf) ||
        (u_dut.u_verify.u_pmul_q.done && u_dut.u_verify.u_pmul_q.inf)) n_inf_product++;
    if (u_dut.u_verify.state_q.name() == "S_IDLE" && u_dut.u_verify.start &&
        !u_dut.u_verify.in_range) n_range_reject++;
    if (vstate_prev == "S_COMBINE" && u_dut.u_verify.done && !u_dut.u_verify.valid) n_inf_sum++;
    vstate_prev = u_dut.u_verify.state_q.name();
  end

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(ecdsa_mode_e m);
    @(negedge clk);
    if (m != last_mode) n_mode_switch++;
    last_mode = m;
    mode = m; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic do_sign(u256 tz, u256 td, u256 tk);
    z = N'(tz); d = N'(td); k = N'(tk);
    op(MODE_SIGN);
  endtask

  task automatic do_verify(string what, u256 tz, u256 tr, u256 ts, bit exp);
    z = N'(tz); r_in = N'(tr); s_in = N'(ts);
    op(MODE_VERIFY);
    check(what, 256'(verify_ok), 256'(exp));
  endtask

  initial begin
    pt_t G, Q, R;
    u256 td, tk, tz, er, es;
    G = mk_pt(C16_GX, C16_GY);
    mode = MODE_SIGN;
    z = '0; d = '0; k = '0; qx = '0; qy = '0; r_in = '0; s_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      td = 256'($urandom_range(65286, 1));
      tk = 256'($urandom_range(65286, 1));
      tz = 256'($urandom_range(65535, 0));
      if (i == 1) tz = 0;                                 // u1 = 0 in verification
      Q  = pt_mul(td, G, C16_A, C16_P);
      qx = N'(Q.x); qy = N'(Q.y);
      R  = pt_mul(tk, G, C16_A, C16_P);
      er = R.x % C16_N;
      if (i == 2) tz = C16_N - mulmod(td, er, C16_N);    // s = 0: retry needed
      if (i == 3) tz = mulmod(td, er, C16_N);             // u1 G = u2 Q
      es = mulmod(invmod(tk, C16_N), addmod(tz % C16_N, mulmod(td, er, C16_N), C16_N), C16_N);
      do_sign(tz, td, tk);
      check("r", 256'(r_out), er);
      check("s", 256'(s_out), es);
      check("sig_ok", 256'(sig_ok), 256'(er != 0 && es != 0));
      if (!sig_ok) begin
        n_retry++;
        tk = (tk % (C16_N - 1)) + 1;                      // new nonce
        do_sign(tz, td, tk);
        check("retry sig_ok", 256'(sig_ok), 1);
      end
      er = 256'(r_out); es = 256'(s_out);
      do_verify("own signature", tz, er, es, 1'b1);
      do_verify("changed message", tz ^ 256'h10, er, es, 1'b0);
      if (i % 4 == 0) do_verify("s out of range", tz, er, '0, 1'b0);
      if (i % 4 == 1) do_verify("forged sum at infinity",
                                (C16_N - mulmod(er, td, C16_N)) % C16_N, er, 256'd77, 1'b0);
    end
    $display("mechanisms: mode_switch=%0d retry=%0d scalar_zero_skip=%0d loop_add=%0d loop_dbl=%0d",
             n_mode_switch, n_retry, n_scan_skip, n_loop_add, n_loop_dbl);
    $display("            range_reject=%0d inf_product=%0d final_dbl=%0d final_add=%0d inf_sum=%0d",
             n_range_reject, n_inf_product, n_final_dbl, n_final_add, n_inf_sum);
    checks += 10;
    if (n_mode_switch == 0) failures++;
    if (n_retry == 0)       failures++;
    if (n_scan_skip == 0)   failures++;
    if (n_loop_add == 0)    failures++;
    if (n_loop_dbl == 0)    failures++;
    if (n_range_reject == 0) failures++;
    if (n_inf_product == 0) failures++;
    if (n_final_dbl == 0)   failures++;
    if (n_final_add == 0)   failures++;
    if (n_inf_sum == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
