// aes_iso_round_core -- protected AES-128 encryption core, one round per cycle.
//
// Every encryption runs in a freshly selected one of 240 isomorphic
// representations of GF(2^8), so the bit patterns inside the datapath differ
// from run to run while the ciphertext is exactly standard AES-128.
//
// Flow: rep_select holds the representation for the next block and op_params
// derives its parameters combinationally. When start is seen while ready:
//   cycle 1 (input)  : plaintext and round key 0 are mapped into the selected
//                      representation and added; the parameters are
//                      registered and the selector advances.
//   cycles 2..11     : one full round per cycle (SubBytes, ShiftRows,
//                      MixColumns, AddRoundKey with the mapped round key);
//                      round 10 bypasses MixColumns.
//   cycle 12 (output): the state is mapped back to the standard representation
//                      into dout and done pulses for one cycle.
// So done rises 12 clock edges after the edge that took start, matching the
// 12-cycle count of the one-round-per-cycle version. dout holds its value
// until the next result. ready is low while busy and during the rare cycles in
// which the selector skips LFSR states that name no representation.
// rep_id shows which representation the current or last block used; it exists
// for test and characterisation and would not be brought out in a product.
// Reset is synchronous, active low. The handshake and the placing of the
// initial key addition in the input cycle are this design's choices; the
// block structure and cycle count follow the proposal.
module aes_iso_round_core
  import aes_iso_pkg::*;
#(
  parameter logic [127:0] KEY  = 128'h000102030405060708090a0b0c0d0e0f,
  parameter logic [7:0]   SEED = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] din,
  output logic         ready,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout,
  output logic [7:0]   rep_id
);
  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_OUT} fsm_t;

  fsm_t         fsm;
  logic [3:0]   rnd;
  logic [127:0] st;
  rep_params_t  prm_d, prm_q;
  logic         rep_valid, take;
  logic [4:0]   poly_idx;
  logic [2:0]   gen_idx;
  logic [7:0]   rep_id_d;
  gf_mat_t      key_map_mat;
  logic [3:0]   rk_sel;
  logic [127:0] rk_std, rk_map, din_map, st_in;
  logic [127:0] sb_o, sr_o, mc_o, mc_sel, rnd_o, out_std;

  assign take  = (fsm == S_IDLE) && start && rep_valid;
  assign ready = (fsm == S_IDLE) && rep_valid;
  assign busy  = (fsm != S_IDLE);

  rep_select #(.SEED(SEED)) u_sel (
    .clk, .rst_n, .advance(take), .rep_valid,
    .poly_idx, .gen_idx, .rep_id(rep_id_d)
  );
  op_params u_prm (.poly_idx, .gen_idx, .prm(prm_d));

  // Round key: read in standard form, mapped into the working representation.
  assign rk_sel      = (fsm == S_IDLE) ? 4'd0 : rnd;
  assign key_map_mat = (fsm == S_IDLE) ? prm_d.map : prm_q.map;
  round_key_store #(.KEY(KEY)) u_rk (.rnd(rk_sel), .rkey(rk_std));
  map_state u_kmap (.din(rk_std), .m_mat(key_map_mat), .dout(rk_map));

  // Input cycle: mapping and initial key addition.
  map_state     u_inmap (.din(din), .m_mat(prm_d.map), .dout(din_map));
  add_round_key u_ark0  (.din(din_map), .rkey(rk_map), .dout(st_in));

  // One round.
  sub_bytes   u_sb (.din(st), .poly(prm_q.poly), .a_mat(prm_q.aff_a), .c_vec(prm_q.aff_c), .dout(sb_o));
  shift_rows  u_sr (.din(sb_o), .dout(sr_o));
  mix_columns u_mc (.din(sr_o), .poly(prm_q.poly), .coef({prm_q.mc3, 8'h01, 8'h01, prm_q.mc2}), .dout(mc_o));
  assign mc_sel = (rnd == 4'd10) ? sr_o : mc_o;
  add_round_key u_ark (.din(mc_sel), .rkey(rk_map), .dout(rnd_o));

  // Output cycle: back to the standard representation.
  map_state u_outmap (.din(st), .m_mat(prm_q.imap), .dout(out_std));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm    <= S_IDLE;
      rnd    <= '0;
      st     <= '0;
      prm_q  <= '0;
      rep_id <= '0;
      dout   <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (fsm)
        S_IDLE: if (take) begin
          st     <= st_in;
          prm_q  <= prm_d;
          rep_id <= rep_id_d;
          rnd    <= 4'd1;
          fsm    <= S_ROUND;
        end
        S_ROUND: begin
          st <= rnd_o;
          if (rnd == 4'd10) fsm <= S_OUT;
          else              rnd <= rnd + 4'd1;
        end
        S_OUT: begin
          dout <= out_std;
          done <= 1'b1;
          fsm  <= S_IDLE;
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end

  a_start_taken: assert property (@(posedge clk) disable iff (!rst_n) take |=> busy);
  a_done_pulse:  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
endmodule
