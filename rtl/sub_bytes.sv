// sub_bytes -- SubBytes on the full 128-bit state in one pass.
//
// Sixteen sbox_iso instances in parallel; the field polynomial, affine matrix
// and affine constant are inputs, so the transformation works in whichever
// representation the core has selected. Purely combinational. Doing all
// sixteen bytes at once is this design's choice; it is what lets both core
// versions finish a SubBytes in a single clock cycle.
module sub_bytes
  import aes_iso_pkg::*;
(
  input  logic [127:0] din,
  input  gf_t          poly,
  input  gf_mat_t      a_mat,
  input  gf_t          c_vec,
  output logic [127:0] dout
);
  state_t si, so;
  assign si   = din;
  assign dout = so;
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox_iso u_sbox (.x(si[i]), .poly(poly), .a_mat(a_mat), .c_vec(c_vec), .y(so[i]));
  end
endmodule
