// Self-checking test of affine point addition at 256 bits on secp256k1:
// sums of multiples iG + jG (computed by the reference) are compared with the
// reference sum, including a pair whose x difference wraps below zero.
module tb_point_add;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  u256 px, py, qx, qy, p, rx, ry;
  logic busy, done;
  always #5 clk = ~clk;

  point_add u_dut (.clk, .rst_n, .start, .px, .py, .qx, .qy, .p, .busy, .done, .rx, .ry);

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
    pt_t G, P, Q, R;
    G = mk_pt(K1_GX, K1_GY);
    px = '0; py = '0; qx = '0; qy = '0; p = K1_P;
    // The reference itself against the published 2G.
    R = pt_dbl(G, '0, K1_P);
    check("reference 2G.x", R.x, K1_2GX);
    check("reference 2G.y", R.y, K1_2GY);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      P = pt_mul(256'($urandom_range(1000, 1)), G, '0, K1_P);
      Q = (i == 0) ? G : pt_mul(rand256() % K1_N, G, '0, K1_P);
      if (i == 1) Q = R;                       // G-multiple with small x
      if (P.x == Q.x) continue;
      R = pt_add(P, Q, '0, K1_P);
      @(negedge clk);
      px = P.x; py = P.y; qx = Q.x; qy = Q.y; start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check("sum.x", rx, R.x);
      check("sum.y", ry, R.y);
      R = pt_dbl(G, '0, K1_P);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
