// op_params -- operation parameters of the selected representation.
//
// Given a polynomial index (0..29) and a generator index k (0..7) it derives
// everything the round transformations need to work in that representation.
// The representation is the field GF(2)[y]/p(y), p = IRR_POLY[idx], reached
// from the AES field by the isomorphism phi that sends x (8'h02) to
// r = ROOT_R0[idx]^(2^k), one of the 8 conjugate roots of the AES polynomial
// in the new field. Then:
//   map column j   = r^j           (computed in the new field)
//   imap column j  = s^j           (computed in the AES field), where
//                   s = ROOT_S0[idx]^(2^((8-k) mod 8)) is phi^-1(y)
//   aff_a          = map * A * imap, aff_c = map * 8'h63   (SubBytes)
//   mc2 = phi(02) = r, mc3 = phi(03) = r + 1               (MixColumns)
// The squarings and powers use gf_mul instances and the matrix products use
// gf_map instances, so the parameters are built from the same arithmetic
// blocks as the cipher. Purely combinational; the core registers the result
// once per encryption. The derivation method (conjugate roots, root tables
// computed at elaboration) is this design's own; that the parameters are
// derived in hardware from the selected polynomial and generator follows the
// proposal.
module op_params
  import aes_iso_pkg::*;
(
  input  logic [4:0]  poly_idx,
  input  logic [2:0]  gen_idx,
  output rep_params_t prm
);
  gf_t p, r0, s0, r, s;
  gf_t rq [8];     // rq[i] = r0^(2^i) in the new field
  gf_t sq [8];     // sq[i] = s0^(2^i) in the AES field
  gf_mat_t m_mat, i_mat, a_mat;
  gf_t ai  [8];    // A * imap column j
  gf_t c_img;
  logic [2:0] s_step;

  assign p  = IRR_POLY[poly_idx];
  assign r0 = ROOT_R0[poly_idx];
  assign s0 = ROOT_S0[poly_idx];

  assign rq[0] = r0;
  assign sq[0] = s0;
  for (genvar i = 0; i < 7; i++) begin : g_sqr
    gf_mul u_rsq (.a(rq[i]), .b(rq[i]), .poly(p),        .y(rq[i+1]));
    gf_mul u_ssq (.a(sq[i]), .b(sq[i]), .poly(AES_POLY), .y(sq[i+1]));
  end
  assign s_step = 3'd0 - gen_idx;          // (8 - k) mod 8
  assign r = rq[gen_idx];
  assign s = sq[s_step];

  assign m_mat[0] = 8'h01;
  assign i_mat[0] = 8'h01;
  for (genvar j = 0; j < 7; j++) begin : g_pow
    gf_mul u_rpow (.a(m_mat[j]), .b(r), .poly(p),        .y(m_mat[j+1]));
    gf_mul u_spow (.a(i_mat[j]), .b(s), .poly(AES_POLY), .y(i_mat[j+1]));
  end

  for (genvar j = 0; j < 8; j++) begin : g_aff
    gf_map u_a  (.x(i_mat[j]), .m_mat(AES_A), .y(ai[j]));
    gf_map u_ma (.x(ai[j]),    .m_mat(m_mat), .y(a_mat[j]));
  end
  gf_map u_c (.x(AES_C), .m_mat(m_mat), .y(c_img));

  always_comb begin
    prm.poly  = p;
    prm.map   = m_mat;
    prm.imap  = i_mat;
    prm.aff_a = a_mat;
    prm.aff_c = c_img;
    prm.mc2   = r;
    prm.mc3   = r ^ 8'h01;
  end
endmodule
