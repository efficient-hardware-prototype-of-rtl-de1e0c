// Self-checking test of the bit-serial divider at 256 bits: random dividends
// over random divisors of every size (including 1, the dividend itself and
// larger than the dividend), against the reference / and %. Checks the
// latency of N+1 cycles.
module tb_int_divider;
  import ecc_ref_pkg::*;
  localparam int N = 256;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  u256 x, y, q, r;
  logic busy, done;
  always #5 clk = ~clk;

  int_divider u_dut (.clk, .rst_n, .start, .x, .y, .busy, .done, .q, .r);

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

  initial begin
    x = '0; y = 256'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 150; i++) begin
      u256 tx, ty;
      int cyc;
      tx = rand256();
      ty = rand256() >> $urandom_range(255, 0);
      if (ty == '0) ty = 256'd1;
      if (i == 0) ty = 256'd1;
      if (i == 1) ty = tx;
      if (i == 2) begin tx = 256'd5; ty = K1_P; end
      if (i == 3) begin tx = K1_P; ty = 256'd3; end
      @(negedge clk);
      x = tx; y = ty; start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      check("quotient", q, tx / ty);
      check("remainder", r, tx % ty);
      checks++;
      if (cyc != N + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
