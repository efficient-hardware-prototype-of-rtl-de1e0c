// One lane of the bit-width sweep: a modular multiplier and a modular
// inverter built at width N, driven with random N-bit odd moduli (the top bit
// set, so the operands really are N bits wide) and checked against the
// reference package. Reports its own check and failure counts and raises
// finished when its runs are done.
module bw_lane #(
  parameter int unsigned N = 24,
  parameter int unsigned RUNS = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import ecc_ref_pkg::*;

  logic mul_start = 0, inv_start = 0, mul_done, inv_done;
  logic [N-1:0] a, b, m, y, z;

  mod_mult #(.N(N)) u_mult (.clk, .rst_n, .start(mul_start), .a, .b, .m,
                            .busy(), .done(mul_done), .y);
  mod_inv  #(.N(N)) u_inv  (.clk, .rst_n, .start(inv_start), .a, .m,
                            .busy(), .done(inv_done), .z);

  function automatic u256 gcd(u256 x, u256 y);
    while (y != '0) begin
      u256 t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic u256 randn();
    u256 r = rand256();
    r = r & ((256'd1 << N) - 1);
    r[N-1] = 1'b1;
    r[0] = 1'b1;
    return r;
  endfunction

  initial begin
    int mul_cyc;
    checks = 0; failures = 0; finished = 0;
    a = '0; b = '0; m = '1;
    @(posedge rst_n);
    for (int i = 0; i < RUNS; i++) begin
      u256 tm = randn();
      u256 ta = rand256() % tm;
      u256 tb_ = rand256() & ((256'd1 << N) - 1);
      @(negedge clk);
      a = N'(ta); b = N'(tb_); m = N'(tm); mul_start = 1;
      @(negedge clk);
      mul_start = 0;
      mul_cyc = 0;
      while (!mul_done) begin @(negedge clk); mul_cyc++; end
      checks += 2;
      if (256'(y) != mulmod(ta, tb_, tm)) begin
        failures++;
        $display("FAIL N=%0d product", N);
      end
      if (mul_cyc != int'(N) + 1) begin
        failures++;
        $display("FAIL N=%0d multiplier latency %0d", N, mul_cyc);
      end
      @(negedge clk);
      inv_start = 1;
      @(negedge clk);
      inv_start = 0;
      while (!inv_done) @(negedge clk);
      checks++;
      if (gcd(tm, ta) == 256'd1 ? (mulmod(ta, 256'(z), tm) != 256'd1) : (z != '0)) begin
        failures++;
        $display("FAIL N=%0d inverse of %h mod %h gave %h", N, ta, tm, z);
      end
    end
    finished = 1;
  end
endmodule
