// round_key_store -- the expanded AES-128 key, held inside the device.
//
// The core has no key input: the key is assumed to live on the chip already
// expanded, as in a smart card. This block is that storage, a read-only table
// of the 11 round keys (round 0 is the initial key addition) in the standard
// representation, indexed by round number; reads are combinational. Its
// contents are expanded from the KEY parameter at elaboration with the
// FIPS-197 key schedule. The default KEY is the FIPS-197 example key; storing
// the key as a ROM filled from a parameter is this design's choice.
module round_key_store
  import aes_iso_pkg::*;
#(
  parameter logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f
) (
  input  logic [3:0]   rnd,
  output logic [127:0] rkey
);
  localparam rk_tab_t RK = f_expand_key(KEY);
  assign rkey = (rnd <= 4'd10) ? RK[rnd] : '0;
endmodule
