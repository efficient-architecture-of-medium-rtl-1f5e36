// aes_inv_shift_rows: InvShiftRows on a 128-bit state.
//
// Row r is rotated right by r positions: output byte 4c+r is input byte
// 4((c-r) mod 4)+r. Pure wiring. Used by the decryption core.
// Interface: state_in -> state_out, combinational.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127 - 8*(4*c + r) -: 8] =
             state_in[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8];
    end
  end
endmodule
