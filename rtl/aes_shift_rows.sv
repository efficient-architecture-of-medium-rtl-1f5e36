// aes_shift_rows: ShiftRows on a 128-bit state.
//
// Row r of the 4x4 state is rotated left by r positions: the byte at row r,
// column c of the result comes from row r, column (c + r) mod 4 of the input.
// With byte i at row i%4, column i/4, output byte 4c+r is input byte
// 4((c+r)%4)+r. Pure wiring, no logic.
// Interface: state_in -> state_out, combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127 - 8*(4*c + r) -: 8] =
             state_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
    end
  end
endmodule
