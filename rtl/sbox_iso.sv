// sbox_iso -- the AES S-box in any of the 240 representations.
//
// One byte of SubBytes: a multiplicative inversion modulo the given field
// polynomial (gf_inv) followed by the affine transform with the given matrix
// and constant (gf_affine). Fed with the AES polynomial, the AES matrix and
// 8'h63 it is the standard S-box; fed with the parameters derived for another
// representation it computes the image of the standard S-box in that one.
// Purely combinational.
// Inversion followed by an affine transform with field-dependent inputs
// follows the proposal; the per-byte helper is this design's packaging.
module sbox_iso
  import aes_iso_pkg::*;
(
  input  gf_t     x,
  input  gf_t     poly,
  input  gf_mat_t a_mat,
  input  gf_t     c_vec,
  output gf_t     y
);
  gf_t inv;
  gf_inv    u_inv (.a(x), .poly(poly), .y(inv));
  gf_affine u_aff (.x(inv), .a_mat(a_mat), .c_vec(c_vec), .y(y));
endmodule
