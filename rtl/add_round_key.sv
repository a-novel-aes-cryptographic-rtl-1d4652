// add_round_key -- AddRoundKey: GF(2^8) addition of the round key.
//
// Sixteen gf_add instances add each round-key byte to the matching state
// byte. Addition is the same in every representation; the core hands this
// block a round key that has already been mapped into the selected
// representation. Purely combinational.
// Its function and construction from adders follow the proposal.
module add_round_key
  import aes_iso_pkg::*;
(
  input  logic [127:0] din,
  input  logic [127:0] rkey,
  output logic [127:0] dout
);
  state_t si, sk, so;
  assign si   = din;
  assign sk   = rkey;
  assign dout = so;
  for (genvar i = 0; i < 16; i++) begin : g_byte
    gf_add u_add (.a(si[i]), .b(sk[i]), .y(so[i]));
  end
endmodule
