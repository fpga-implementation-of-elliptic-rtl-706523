// gf_adder: GF(2^m) addition (ADDER unit).
//
// Addition of two binary polynomials is a bitwise exclusive OR of their
// coefficients, so the unit is an array of m XOR gates with no reduction.
// Combinational: dt1, dt2 are the operands, a_out the sum.
// The XOR-array adder is the one of the original architecture.
module gf_adder #(
  parameter int M = ecc_pkg::M
) (
  input  logic [M-1:0] dt1,
  input  logic [M-1:0] dt2,
  output logic [M-1:0] a_out
);
  assign a_out = dt1 ^ dt2;
endmodule
