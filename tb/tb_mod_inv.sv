// Self-checking test of the extended-Euclid modular inverter at 256 bits:
// random values modulo the secp256k1 prime and order, checked against
// Fermat's a^(m-2) mod m and by a * z mod m == 1; plus the corner cases
// a = 1, a = m - 1, a = 2, and a value sharing a factor with a composite
// modulus (no inverse, result 0).
module tb_mod_inv;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  longint total_cycles = 0;

  logic clk = 0, rst_n = 0, start = 0;
  u256 a, m, z;
  logic busy, done;
  always #5 clk = ~clk;

  mod_inv u_dut (.clk, .rst_n, .start, .a, .m, .busy, .done, .z);

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(u256 ta, u256 tm, output u256 res);
    @(negedge clk);
    a = ta; m = tm; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); total_cycles++; end
    res = z;
  endtask

  initial begin
    u256 res, ta, tm;
    a = '0; m = 256'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 24; i++) begin
      tm = (i % 2 == 0) ? K1_P : K1_N;
      ta = rand256() % tm;
      if (ta == '0) ta = 256'd7;
      if (i == 0) ta = 256'd1;
      if (i == 1) ta = tm - 1;
      if (i == 2) ta = 256'd2;
      run(ta, tm, res);
      check("inverse", res, invmod(ta, tm));
      check("a*z", mulmod(ta, res, tm), 256'd1);
    end
    // Composite modulus: 6 has no inverse mod 2^200 * 3; 5 has one.
    tm = (256'd3 << 200);
    run(256'd6, tm, res);
    check("no inverse", res, '0);
    run(256'd5, tm, res);
    check("composite a*z", mulmod(256'd5, res, tm), 256'd1);
    $display("average cycles per 256-bit inversion: %0d", total_cycles / 24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
