// mix_columns -- MixColumns with programmable coefficients and field.
//
// Each column (a0..a3) is read as the polynomial a3 x^3 + a2 x^2 + a1 x + a0
// over GF(2^8), multiplied by C(x) = coef[3] x^3 + coef[2] x^2 + coef[1] x +
// coef[0] and reduced modulo x^4 + 1:  b_i = sum_j coef[(i - j) mod 4] * a_j.
// Both C(x) and the field polynomial are inputs, so the block works in any
// representation; for AES in the standard representation coef = {03,01,01,02}.
// Built from 64 gf_mul and 48 gf_add instances; purely combinational.
// Programmable C(x) and polynomial, and the split into field multiplications
// and additions, follow the proposal; full-state width is this design's choice.
module mix_columns
  import aes_iso_pkg::*;
(
  input  logic [127:0]    din,
  input  gf_t             poly,
  input  logic [3:0][7:0] coef,
  output logic [127:0]    dout
);
  state_t si, so;
  assign si   = din;
  assign dout = so;
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar i = 0; i < 4; i++) begin : g_out
      gf_t prod [4];
      gf_t sum  [3];
      for (genvar j = 0; j < 4; j++) begin : g_term
        gf_mul u_mul (.a(coef[(i - j + 4) % 4]), .b(si[4*c + j]), .poly(poly), .y(prod[j]));
      end
      gf_add u_add0 (.a(prod[0]), .b(prod[1]), .y(sum[0]));
      gf_add u_add1 (.a(prod[2]), .b(prod[3]), .y(sum[1]));
      gf_add u_add2 (.a(sum[0]),  .b(sum[1]),  .y(sum[2]));
      assign so[4*c + i] = sum[2];
    end
  end
endmodule
