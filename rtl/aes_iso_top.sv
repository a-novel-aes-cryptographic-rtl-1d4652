// aes_iso_top -- the two versions of the protected AES-128 core side by side.
//
// Both cores are built from the same representation-independent GF(2^8)
// blocks and differ only in how their top level sequences them:
//   v1_* : aes_iso_round_core, one round per cycle, 12 cycles per block.
//   v2_* : aes_iso_step_core, one transformation per cycle, 42 cycles per
//          block, shorter critical path.
// Each has its own start/ready/busy/done handshake, 128-bit data in and out
// and a rep_id status output; they share only clock, reset and the KEY and
// SEED parameters (each core holds its own copy of the expanded key and its
// own representation selector). Instantiating both together is this design's
// way of presenting the two versions at once; in a product one would be
// chosen.
module aes_iso_top
  import aes_iso_pkg::*;
#(
  parameter logic [127:0] KEY  = 128'h000102030405060708090a0b0c0d0e0f,
  parameter logic [7:0]   SEED = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         v1_start,
  input  logic [127:0] v1_din,
  output logic         v1_ready,
  output logic         v1_busy,
  output logic         v1_done,
  output logic [127:0] v1_dout,
  output logic [7:0]   v1_rep_id,
  input  logic         v2_start,
  input  logic [127:0] v2_din,
  output logic         v2_ready,
  output logic         v2_busy,
  output logic         v2_done,
  output logic [127:0] v2_dout,
  output logic [7:0]   v2_rep_id
);
  aes_iso_round_core #(.KEY(KEY), .SEED(SEED)) u_v1 (
    .clk, .rst_n, .start(v1_start), .din(v1_din), .ready(v1_ready), .busy(v1_busy),
    .done(v1_done), .dout(v1_dout), .rep_id(v1_rep_id)
  );
  aes_iso_step_core #(.KEY(KEY), .SEED(SEED)) u_v2 (
    .clk, .rst_n, .start(v2_start), .din(v2_din), .ready(v2_ready), .busy(v2_busy),
    .done(v2_done), .dout(v2_dout), .rep_id(v2_rep_id)
  );
endmodule
