// Self-checking test of ECDSA signature generation on the 16-bit test curve:
// random keys, nonces and hashes (including hashes above n, which must be
// reduced) compared with the reference r = x(kG) mod n and
// s = k^-1 (z + d r) mod n; a hash chosen so that s = 0 must clear ok.
module tb_ecdsa_sign;
  import ecc_ref_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] z, d, k, r, s;
  logic busy, done, ok;
  always #5 clk = ~clk;

  ecdsa_sign #(.N(N)) u_dut (.clk, .rst_n, .start, .z, .d, .k,
                             .gx(N'(C16_GX)), .gy(N'(C16_GY)), .curve_a(N'(C16_A)),
                             .p(N'(C16_P)), .n(N'(C16_N)), .busy, .done, .r, .s, .ok);

  task automatic check(string what, u256 got, u256 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t G, R;
    u256 td, tk, tz, er, es;
    G = mk_pt(C16_GX, C16_GY);
    z = '0; d = '0; k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      td = 256'($urandom_range(65286, 1));
      tk = 256'($urandom_range(65286, 1));
      tz = 256'($urandom_range(65535, 0));
      R  = pt_mul(tk, G, C16_A, C16_P);
      er = R.x % C16_N;
      if (i == 1) tz = C16_N - mulmod(td, er, C16_N);   // forces s = 0
      es = mulmod(invmod(tk, C16_N), addmod(tz % C16_N, mulmod(td, er, C16_N), C16_N), C16_N);
      @(negedge clk);
      z = N'(tz); d = N'(td); k = N'(tk); start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check("r", 256'(r), er);
      check("s", 256'(s), es);
      check("ok", 256'(ok), 256'(er != '0 && es != '0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
