// aes_mix_columns: MixColumns on a 128-bit state.
//
// Four aes_mix_column units, one per column (bytes 4c..4c+3), in parallel.
// Interface: state_in -> state_out, combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mix_column u_col (
      .col_in (state_in [127 - 32*c -: 32]),
      .col_out(state_out[127 - 32*c -: 32])
    );
  end
endmodule
