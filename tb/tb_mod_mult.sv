// Self-checking test of the counter-driven modular multiplier at its default
// 256-bit width: random products mod the secp256k1 prime, the secp256k1 order
// and random odd moduli, squaring (a = b) and corner values, against the
// reference a*b % m. Also checks the latency: done exactly N+1 cycles after
// start.
module tb_mod_mult;
  import ecc_ref_pkg::*;
  localparam int N = 256;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  u256 a, b, m, y;
  logic busy, done;
  always #5 clk = ~clk;

  mod_mult u_dut (.clk, .rst_n, .start, .a, .b, .m, .busy, .done, .y);

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(u256 ta, u256 tb_, u256 tm);
    int cyc = 0;
    @(negedge clk);
    a = ta; b = tb_; m = tm; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check("product", y, mulmod(ta, tb_, tm));
    checks++;
    if (cyc != N + 1) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, N + 1);
    end
  endtask

  initial begin
    a = '0; b = '0; m = 256'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 120; i++) begin
      u256 tm, ta, tb_;
      case (i % 3)
        0: tm = K1_P;
        1: tm = K1_N;
        default: tm = rand256() | 256'd1;
      endcase
      ta = rand256() % tm;
      tb_ = (i % 5 == 0) ? ta : rand256();   // squaring every fifth run
      if (i == 0) begin ta = tm - 1; tb_ = '1; end
      if (i == 1) begin ta = '0; end
      if (i == 2) begin tb_ = '0; end
      if (i == 4) begin ta = 256'd1; tb_ = tm - 1; end
      run(ta, tb_, tm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
