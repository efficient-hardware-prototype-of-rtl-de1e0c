// Modular subtractor: y = (a - b) mod m for reduced operands (a, b < m).
//
// The "Subtractor" boxes of the point-addition and point-doubling datapaths.
// If a < b the difference wraps and m is added back once. Purely
// combinational; N is the operand width. Operands must already be below m
// (own choice: the published design names the subtractor but gives no detail).
module mod_sub #(
  parameter int unsigned N = ecdsa_pkg::ECC_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic [N-1:0] y
);
  logic [N-1:0] dif;
  always_comb begin
    dif = a - b;
    y   = (a < b) ? dif + m : dif;
  end
endmodule
