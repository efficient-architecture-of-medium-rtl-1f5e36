// aes_inv_sub_bytes: InvSubBytes on a whole 128-bit state.
//
// Sixteen aes_inv_sbox instances in parallel. Used by the decryption core.
// Interface: state_in -> state_out, combinational.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar i = 0; i < NB_BYTES; i++) begin : g_sbox
    aes_inv_sbox u_sbox (
      .in_byte (state_in [127 - 8*i -: 8]),
      .out_byte(state_out[127 - 8*i -: 8])
    );
  end
endmodule
