// gf_affine -- affine transform over GF(2): y = A*x + c.
//
// x and c are 8-element GF(2) vectors and A an 8x8 binary matrix, all given as
// inputs, so the transform of SubBytes can be fed the matrix and constant that
// belong to the selected representation. A is packed by column (a_mat[j] is
// the image of bit j): the product is the XOR of the columns picked by the
// set bits of x. Purely combinational.
// Taking A and c as inputs follows the proposal; the column packing is this
// design's convention.
module gf_affine
  import aes_iso_pkg::*;
(
  input  gf_t     x,
  input  gf_mat_t a_mat,
  input  gf_t     c_vec,
  output gf_t     y
);
  always_comb begin
    y = c_vec;
    for (int j = 0; j < 8; j++)
      if (x[j]) y = y ^ a_mat[j];
  end
endmodule
