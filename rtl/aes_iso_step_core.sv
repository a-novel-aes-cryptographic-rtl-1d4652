// aes_iso_step_core -- protected AES-128 encryption core, one round
// transformation per cycle.
//
// Same countermeasure and building blocks as aes_iso_round_core: every
// encryption runs in a freshly selected one of 240 isomorphic representations
// of GF(2^8), and the ciphertext is exactly standard AES-128. Only the
// sequencing differs: the state register is loaded after each single
// transformation, so the longest path is one SubBytes instead of a whole
// round.
//
// When start is seen while ready:
//   cycle 1 (input)  : plaintext and round key 0 are mapped into the selected
//                      representation and added; parameters are registered
//                      and the selector advances.
//   cycles 2..41     : rounds 1..10, four cycles each: SubBytes, ShiftRows,
//                      MixColumns, AddRoundKey. In round 10 the MixColumns
//                      cycle holds the state unchanged.
//   cycle 42 (output): inverse mapping into dout, done pulses for one cycle.
// The 42-cycle count follows the proposal; keeping the unused MixColumns slot
// of round 10 as an idle cycle is this design's reading of that count.
// Interface, reset and rep_id are as in aes_iso_round_core.
module aes_iso_step_core
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
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} fsm_t;
  typedef enum logic [1:0] {P_SB, P_SR, P_MC, P_ARK} phase_t;

  fsm_t         fsm;
  phase_t       ph;
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
  logic [127:0] sb_o, sr_o, mc_o, ark_o, out_std;

  assign take  = (fsm == S_IDLE) && start && rep_valid;
  assign ready = (fsm == S_IDLE) && rep_valid;
  assign busy  = (fsm != S_IDLE);

  rep_select #(.SEED(SEED)) u_sel (
    .clk, .rst_n, .advance(take), .rep_valid,
    .poly_idx, .gen_idx, .rep_id(rep_id_d)
  );
  op_params u_prm (.poly_idx, .gen_idx, .prm(prm_d));

  assign rk_sel      = (fsm == S_IDLE) ? 4'd0 : rnd;
  assign key_map_mat = (fsm == S_IDLE) ? prm_d.map : prm_q.map;
  round_key_store #(.KEY(KEY)) u_rk (.rnd(rk_sel), .rkey(rk_std));
  map_state u_kmap (.din(rk_std), .m_mat(key_map_mat), .dout(rk_map));

  map_state     u_inmap (.din(din), .m_mat(prm_d.map), .dout(din_map));
  add_round_key u_ark0  (.din(din_map), .rkey(rk_map), .dout(st_in));

  // Each transformation reads the state register directly.
  sub_bytes     u_sb  (.din(st), .poly(prm_q.poly), .a_mat(prm_q.aff_a), .c_vec(prm_q.aff_c), .dout(sb_o));
  shift_rows    u_sr  (.din(st), .dout(sr_o));
  mix_columns   u_mc  (.din(st), .poly(prm_q.poly), .coef({prm_q.mc3, 8'h01, 8'h01, prm_q.mc2}), .dout(mc_o));
  add_round_key u_ark (.din(st), .rkey(rk_map), .dout(ark_o));

  map_state u_outmap (.din(st), .m_mat(prm_q.imap), .dout(out_std));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm    <= S_IDLE;
      ph     <= P_SB;
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
          ph     <= P_SB;
          fsm    <= S_RUN;
        end
        S_RUN: begin
          unique case (ph)
            P_SB:  st <= sb_o;
            P_SR:  st <= sr_o;
            P_MC:  if (rnd != 4'd10) st <= mc_o;
            P_ARK: st <= ark_o;
            default: ;
          endcase
          ph <= phase_t'(ph + 2'd1);
          if (ph == P_ARK) begin
            if (rnd == 4'd10) fsm <= S_OUT;
            else              rnd <= rnd + 4'd1;
          end
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
