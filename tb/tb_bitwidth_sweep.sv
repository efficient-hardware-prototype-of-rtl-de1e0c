// Runs the modular multiplier and the modular inverter at every operand width
// of the published evaluation: 24, 32, 64, 86, 103, 142, 160, 163, 192, 224
// and 256 bits, with random odd moduli of full width. Each width checks the
// result and the N+1-cycle multiplier latency.
module tb_bitwidth_sweep;
  localparam int NW = 11;
  localparam int WIDTHS[NW] = '{24, 32, 64, 86, 103, 142, 160, 163, 192, 224, 256};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int lane_checks[NW], lane_failures[NW];
  logic [NW-1:0] lane_finished;

  for (genvar g = 0; g < NW; g++) begin : g_lane
    bw_lane #(.N(WIDTHS[g]), .RUNS(4)) u_lane (
      .clk, .rst_n, .checks(lane_checks[g]), .failures(lane_failures[g]),
      .finished(lane_finished[g])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&lane_finished);
    @(negedge clk);
    for (int i = 0; i < NW; i++) begin
      $display("N=%0d: checks=%0d failures=%0d", WIDTHS[i], lane_checks[i], lane_failures[i]);
      checks   += lane_checks[i];
      failures += lane_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
