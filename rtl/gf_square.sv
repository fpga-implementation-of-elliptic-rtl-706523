// gf_square: GF(2^m) squaring (SQUARE unit with its NIST reduction).
//
// Over GF(2) the square of a polynomial is obtained by inserting a zero
// coefficient after every coefficient of the operand, giving a polynomial of
// 2m-1 bits; an instance of nist_reduce brings it back to m bits. The whole
// path is combinational, so a square completes in one clock cycle of the
// processor.
//
// Ports: dt1 (operand), s_out (reduced square).
// The zero-interleaving squarer with its own reduction unit follows the
// original architecture; taking the operand from DT1 is as described there.
module gf_square #(
  parameter int M = ecc_pkg::M
) (
  input  logic [M-1:0] dt1,
  output logic [M-1:0] s_out
);
  logic [2*M-2:0] sq;

  always_comb begin
    sq = '0;
    for (int i = 0; i < M; i++) sq[2*i] = dt1[i];
  end

  nist_reduce #(.M(M)) u_red (.c(sq), .r(s_out));

endmodule
