// gf_map -- change of representation of one GF(2^8) element.
//
// The element is taken as a vector over GF(2) and multiplied by an 8x8 binary
// matrix given as an input, exactly a change of basis. With the mapping matrix
// it converts from the standard AES representation to the selected one; with
// the inverse matrix it converts back. The matrix is packed by column
// (m_mat[j] is the image of bit j). Purely combinational.
// The matrix-vector form follows the proposal; the column packing is this
// design's convention.
module gf_map
  import aes_iso_pkg::*;
(
  input  gf_t     x,
  input  gf_mat_t m_mat,
  output gf_t     y
);
  always_comb begin
    y = '0;
    for (int j = 0; j < 8; j++)
      if (x[j]) y = y ^ m_mat[j];
  end
endmodule
