// Bit-serial integer divider: q = x / y, r = x mod y.
//
// The "Divider circuit" and "Modulo operation" of the modular inverter:
// a restoring divider that brings in one dividend bit per clock, most
// significant first, subtracts the divisor when the partial remainder allows
// it and shifts the resulting quotient bit in. Quotient and remainder come
// from the same pass. The published design names this unit only; the restoring
// structure is this implementation's choice.
//
// Interface: x and y are sampled with the one-cycle start pulse; done pulses
// for one cycle when q and r are valid, and they hold until the next start.
// Dividing by zero yields q = all ones and r = x.
// Timing: N iteration cycles, done N+1 cycles after start.
module int_divider #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] q,
  output logic [N-1:0] r
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  x_q, y_q, quo_q, rem_q;
  logic [CW-1:0] ctr_q;
  logic          run_q;

  logic [N:0] part, part_sub;
  logic       take;
  always_comb begin
    part     = {rem_q, x_q[N-1]};
    part_sub = part - {1'b0, y_q};
    take     = (part >= {1'b0, y_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      quo_q <= '0;
      rem_q <= '0;
      ctr_q <= '0;
      run_q <= 1'b0;
      done  <= 1'b0;
      q     <= '0;
      r     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x_q   <= x;
        y_q   <= y;
        quo_q <= '0;
        rem_q <= '0;
        ctr_q <= '0;
        run_q <= 1'b1;
      end else if (run_q) begin
        if (ctr_q < CW'(N)) begin
          rem_q <= take ? part_sub[N-1:0] : part[N-1:0];
          quo_q <= {quo_q[N-2:0], take};
          x_q   <= {x_q[N-2:0], 1'b0};
          ctr_q <= ctr_q + 1'b1;
        end else begin
          q     <= quo_q;
          r     <= rem_q;
          done  <= 1'b1;
          run_q <= 1'b0;
        end
      end
    end
  end

  assign busy = run_q;

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !run_q);
endmodule
