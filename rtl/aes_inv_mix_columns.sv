// aes_inv_mix_columns: InvMixColumns on a 128-bit state.
//
// Uses the factorisation of the inverse matrix [14 11 13 9] into a cheap
// pre-step followed by the forward MixColumns: per column,
// u = 4*(a0^a2), v = 4*(a1^a3); a0^=u, a1^=v, a2^=u, a3^=v; then MixColumns.
// So the decryption side reuses aes_mix_column. Used by the decryption core.
// Interface: state_in -> state_out, combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    word_t col, pre;
    byte_t u, v;
    assign col = state_in[127 - 32*c -: 32];
    assign u   = xtime(xtime(col[31:24] ^ col[15:8]));
    assign v   = xtime(xtime(col[23:16] ^ col[7:0]));
    assign pre = col ^ {u, v, u, v};
    aes_mix_column u_col (
      .col_in (pre),
      .col_out(state_out[127 - 32*c -: 32])
    );
  end
endmodule
