// gf_mul -- representation-independent GF(2^8) multiplier.
//
// Multiplies a by b modulo the irreducible polynomial x^8 + poly, where poly
// holds the eight low coefficients and arrives as an input, so the same
// multiplier serves whichever of the 30 field polynomials is selected. It is a
// shift-and-add multiplier with interleaved reduction: for each bit of b the
// running multiple of a is added to the product, then multiplied by x and
// reduced by poly when a coefficient would overflow into x^8. Purely
// combinational (eight conditional XOR stages). The interleaved structure is
// this design's own choice; the polynomial input follows the description of a
// multiplier built to work in any representation.
module gf_mul (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] poly,
  output logic [7:0] y
);
  always_comb begin
    logic [7:0] acc;
    logic [7:0] aa;
    acc = '0;
    aa  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? poly : 8'h00);
    end
    y = acc;
  end
endmodule
