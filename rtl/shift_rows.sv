// shift_rows -- ShiftRows as pure wiring.
//
// Row r of the 4x4 state is rotated left by r byte positions:
// out(r, c) = in(r, (c + r) mod 4). Bytes are numbered i = r + 4c, byte 0 in
// bits 127:120. The operation only moves bytes, so it is the same in every
// representation and needs no field parameters. No logic, no clock.
// Implementing ShiftRows as routing follows the proposal.
module shift_rows
  import aes_iso_pkg::*;
(
  input  logic [127:0] din,
  output logic [127:0] dout
);
  state_t si, so;
  assign si   = din;
  assign dout = so;
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign so[r + 4*c] = si[r + 4*((c + r) % 4)];
    end
  end
endmodule
