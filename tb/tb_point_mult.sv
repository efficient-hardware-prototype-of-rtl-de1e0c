// Self-checking test of double-and-add point multiplication: on the 16-bit
// test curve with scalars across the whole range [0, n) (k = 0 must report
// the point at infinity, k = 1 must return G, k = n - 1 gives -G), and at
// 256 bits on secp256k1 with short scalars and one full-length scalar.
// Results are compared with the reference's right-to-left multiplication.
module tb_point_mult;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, start16 = 0;
  u256 k, qx, qy;
  logic [15:0] k16, qx16, qy16;
  logic busy, done, inf, busy16, done16, inf16;
  always #5 clk = ~clk;

  point_mult u_dut (.clk, .rst_n, .start, .k, .px(K1_GX), .py(K1_GY), .curve_a('0), .p(K1_P),
                    .busy, .done, .qx, .qy, .inf);
  point_mult #(.N(16)) u_dut16 (.clk, .rst_n, .start(start16), .k(k16),
                                .px(16'(C16_GX)), .py(16'(C16_GY)), .curve_a(16'(C16_A)),
                                .p(16'(C16_P)), .busy(busy16), .done(done16),
                                .qx(qx16), .qy(qy16), .inf(inf16));

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

  initial begin
    pt_t G, R;
    u256 tk;
    k = '0; k16 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    G = mk_pt(C16_GX, C16_GY);
    for (int i = 0; i < 40; i++) begin
      tk = 256'($urandom_range(65286, 1));
      if (i == 0) tk = '0;
      if (i == 1) tk = 256'd1;
      if (i == 2) tk = C16_N - 1;
      if (i == 3) tk = 256'd2;
      R = pt_mul(tk, G, C16_A, C16_P);
      @(negedge clk);
      k16 = 16'(tk); start16 = 1;
      @(negedge clk);
      start16 = 0;
      while (!done16) @(negedge clk);
      check("16-bit inf", 256'(inf16), 256'(R.inf));
      if (!R.inf) begin
        check("16-bit kG.x", 256'(qx16), R.x);
        check("16-bit kG.y", 256'(qy16), R.y);
      end
    end
    G = mk_pt(K1_GX, K1_GY);
    for (int i = 0; i < 4; i++) begin
      tk = 256'($urandom_range(4095, 1));
      if (i == 0) tk = 256'd2;
      if (i == 3) tk = rand256() % K1_N;      // one full-length scalar
      R = pt_mul(tk, G, '0, K1_P);
      @(negedge clk);
      k = tk; start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check("kG.x", qx, R.x);
      check("kG.y", qy, R.y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
