// gf_inv -- representation-independent GF(2^8) inverter.
//
// Returns a^-1 modulo x^8 + poly, and 0 for a = 0. Since every non-zero
// element satisfies a^255 = 1, the inverse is a^254, computed here with an
// addition chain of 13 gf_mul instances (7 squarings, 6 multiplications):
//   a^3 = a^2*a, a^7 = (a^3)^2*a, a^15, a^31, a^63, a^127, a^254 = (a^127)^2.
// The chain gives 0 for a = 0 without a special case. Purely combinational.
// The field polynomial as an input follows the description of an inverter
// built for any representation; the exponentiation method is this design's.
module gf_inv (
  input  logic [7:0] a,
  input  logic [7:0] poly,
  output logic [7:0] y
);
  // t[k] = a^(2^(k+1)-1) for k = 0..6 (a, a^3, a^7, ..., a^127)
  logic [7:0] t  [7];
  logic [7:0] sq [7];   // sq[k] = t[k]^2

  assign t[0] = a;
  for (genvar k = 0; k < 7; k++) begin : g_chain
    gf_mul u_sq (.a(t[k]), .b(t[k]), .poly(poly), .y(sq[k]));
    if (k < 6) begin : g_mul
      gf_mul u_mul (.a(sq[k]), .b(a), .poly(poly), .y(t[k+1]));
    end
  end
  assign y = sq[6];
endmodule
