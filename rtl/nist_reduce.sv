// nist_reduce: reduction of a product or square of two field elements
// (degree <= 2m-2) modulo f(z) = z^m + z^K3 + z^K2 + z^K1 + 1.
//
// Combinational. The upper m-1 coefficients are folded down once using
// z^m = z^K3 + z^K2 + z^K1 + 1; the few coefficients that then land at or
// above z^m (at most K3 of them) are folded a second time. This is the
// fixed shift-and-XOR network of the NIST fast reduction for B-163, written
// at polynomial level instead of in 32-bit words. One instance follows the
// squarer and one the multiplier, as in the design.
//
// Ports: c (2m-1 bits, unreduced), r (m bits, reduced). No clock.
// Using the NIST reduction after each of MULT and SQUARE follows the
// original architecture; the polynomial-level formulation is this
// implementation's own.
module nist_reduce #(
  parameter int M  = ecc_pkg::M,
  parameter int K1 = ecc_pkg::K1,
  parameter int K2 = ecc_pkg::K2,
  parameter int K3 = ecc_pkg::K3
) (
  input  logic [2*M-2:0] c,
  output logic [M-1:0]   r
);
  localparam int W = M + K3;  // width after the first fold

  logic [W-1:0]  h1, s1;
  logic [M-1:0]  h2;

  always_comb begin
    h1 = W'(c[2*M-2:M]);
    s1 = W'(c[M-1:0]) ^ h1 ^ (h1 << K1) ^ (h1 << K2) ^ (h1 << K3);
    h2 = M'(s1[W-1:M]);
    r  = s1[M-1:0] ^ h2 ^ (h2 << K1) ^ (h2 << K2) ^ (h2 << K3);
  end

endmodule
