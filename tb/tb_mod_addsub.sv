// Self-checking test of the modular adder and subtractor at 256 bits
// (secp256k1 field prime and random moduli) and at 16 bits (exhaustive
// corner values), against the reference package's plain % arithmetic.
module tb_mod_addsub;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  u256 a, b, m, y_add, y_sub;
  logic [15:0] a16, b16, m16, y16_add, y16_sub;

  mod_add u_add (.a(a), .b(b), .m(m), .y(y_add));
  mod_sub u_sub (.a(a), .b(b), .m(m), .y(y_sub));
  mod_add #(.N(16)) u_add16 (.a(a16), .b(b16), .m(m16), .y(y16_add));
  mod_sub #(.N(16)) u_sub16 (.a(a16), .b(b16), .m(m16), .y(y16_sub));

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      m = (i % 2 == 0) ? K1_P : (rand256() | 256'd1);
      a = rand256() % m;
      b = rand256() % m;
      if (i == 1) begin a = m - 1; b = m - 1; end
      if (i == 3) begin a = '0; b = m - 1; end
      #1;
      check("add256", y_add, addmod(a, b, m));
      check("sub256", y_sub, submod(a, b, m));
    end
    for (int i = 0; i < 2000; i++) begin
      m16 = (i < 1000) ? 16'd65519 : 16'($urandom_range(65535, 2));
      a16 = 16'($urandom % m16);
      b16 = 16'($urandom % m16);
      if (i % 100 == 0) begin a16 = m16 - 1; b16 = m16 - 1; end
      #1;
      check("add16", 256'(y16_add), addmod(256'(a16), 256'(b16), 256'(m16)));
      check("sub16", 256'(y16_sub), submod(256'(a16), 256'(b16), 256'(m16)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
