// Self-checking test of affine point doubling: at 256 bits on secp256k1
// (a = 0, including the published value of 2G) and at 16 bits on the test
// curve y^2 = x^3 + 4x + 12 over GF(65519), where the curve coefficient a is
// non-zero and takes part in the slope.
module tb_point_double;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, start16 = 0;
  u256 px, py, rx, ry;
  logic [15:0] px16, py16, rx16, ry16;
  logic busy, done, busy16, done16;
  always #5 clk = ~clk;

  point_double u_dut (.clk, .rst_n, .start, .px, .py, .curve_a('0), .p(K1_P),
                      .busy, .done, .rx, .ry);
  point_double #(.N(16)) u_dut16 (.clk, .rst_n, .start(start16), .px(px16), .py(py16),
                                  .curve_a(16'(C16_A)), .p(16'(C16_P)),
                                  .busy(busy16), .done(done16), .rx(rx16), .ry(ry16));

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t G, P, R;
    px = '0; py = '0; px16 = '0; py16 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    G = mk_pt(K1_GX, K1_GY);
    for (int i = 0; i < 6; i++) begin
      P = (i == 0) ? G : pt_mul(rand256() % K1_N, G, '0, K1_P);
      R = pt_dbl(P, '0, K1_P);
      @(negedge clk);
      px = P.x; py = P.y; start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      if (i == 0) begin
        check("2G.x published", rx, K1_2GX);
        check("2G.y published", ry, K1_2GY);
      end
      check("2P.x", rx, R.x);
      check("2P.y", ry, R.y);
    end
    G = mk_pt(C16_GX, C16_GY);
    for (int i = 0; i < 60; i++) begin
      P = pt_mul(256'($urandom_range(65286, 1)), G, C16_A, C16_P);
      R = pt_dbl(P, C16_A, C16_P);
      @(negedge clk);
      px16 = 16'(P.x); py16 = 16'(P.y); start16 = 1;
      @(negedge clk);
      start16 = 0;
      while (!done16) @(negedge clk);
      check("16-bit 2P.x", 256'(rx16), R.x);
      check("16-bit 2P.y", 256'(ry16), R.y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
