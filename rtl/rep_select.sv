// rep_select -- selection of the internal field representation.
//
// One of 240 representations is named by a number 0..239: the field
// polynomial index is number/8 (0..29) and the generator index number mod 8.
// The number comes from an 8-bit Fibonacci LFSR with the primitive feedback
// polynomial x^8 + x^6 + x^5 + x^4 + 1, whose 255 non-zero states are visited
// once per period; the representation number is state - 1. The 15 states
// whose number would be 240 or more are skipped: while the LFSR sits on one,
// rep_valid is low and the register steps on its own, one state per cycle.
// So each of the 240 representations is used exactly once in every run of
// 240 encryptions, as the proposal requires of its generator.
//
// Interface: advance (sampled at the rising edge, only meaningful while
// rep_valid is high) moves to the next representation after the current one
// has been taken. Reset is synchronous, active low, and loads SEED.
// Using an LFSR is a proof-of-concept choice: its output is predictable and a
// production device would replace this block by a true random source. The
// feedback polynomial, the skipping rule and the numbering are this design's.
module rep_select
  import aes_iso_pkg::*;
#(
  parameter logic [7:0] SEED = 8'h01
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       advance,
  output logic       rep_valid,
  output logic [4:0] poly_idx,
  output logic [2:0] gen_idx,
  output logic [7:0] rep_id
);
  logic [7:0] lfsr;
  logic [7:0] num;
  logic       fb;

  assign fb        = lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3];
  assign num       = lfsr - 8'd1;
  assign rep_valid = (num < 8'(N_REPS));
  assign rep_id    = num;
  assign poly_idx  = num[7:3];
  assign gen_idx   = num[2:0];

  always_ff @(posedge clk) begin
    if (!rst_n)                       lfsr <= SEED;
    else if (advance || !rep_valid)   lfsr <= {lfsr[6:0], fb};
  end

  initial assert (SEED != 8'h00) else $error("rep_select: SEED must be non-zero");

  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) lfsr != 8'h00);
endmodule
