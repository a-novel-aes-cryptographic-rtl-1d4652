// map_state -- change of representation of a whole 128-bit block.
//
// Sixteen gf_map instances, one per byte, all with the same matrix. The core
// uses three of these: the input mapping (plaintext into the selected
// representation), the round-key mapping (stored standard round key into the
// selected representation) and the inverse mapping (result back to the
// standard representation). Purely combinational.
// The three mapping points follow the proposal's block diagram; sharing one
// module for all of them is this design's choice.
module map_state
  import aes_iso_pkg::*;
(
  input  logic [127:0] din,
  input  gf_mat_t      m_mat,
  output logic [127:0] dout
);
  state_t si, so;
  assign si   = din;
  assign dout = so;
  for (genvar i = 0; i < 16; i++) begin : g_byte
    gf_map u_map (.x(si[i]), .m_mat(m_mat), .y(so[i]));
  end
endmodule
