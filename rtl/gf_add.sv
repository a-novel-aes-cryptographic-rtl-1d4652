// gf_add -- addition of two GF(2^8) elements.
//
// Addition in any field of characteristic 2 is the coefficient-wise sum
// modulo 2, i.e. a bitwise XOR, and it is the same in every one of the 240
// representations, so this adder needs no polynomial input. Purely
// combinational, no clock. Used by AddRoundKey and MixColumns.
// A separate adder block follows the proposal's decomposition into adder,
// multiplier and inverter.
module gf_add (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y
);
  assign y = a ^ b;
endmodule
