// Modular adder: y = (a + b) mod m for reduced operands (a, b < m).
//
// The "Adder" boxes of the point-doubling datapath. The sum is formed with
// one extra bit and corrected by a single conditional subtraction of m.
// Purely combinational; N is the operand width. Keeping the operands below
// m is the caller's duty (this is a design choice: the published design names the
// adder but gives no detail).
module mod_add #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic [N-1:0] y
);
  logic [N:0] sum, dif;
  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    dif = sum - {1'b0, m};
    y   = (sum >= {1'b0, m}) ? dif[N-1:0] : sum[N-1:0];
  end
endmodule
