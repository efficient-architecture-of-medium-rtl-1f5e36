// aes_inv_round: one round of the AES inverse cipher, combinational.
//
// InvShiftRows -> InvSubBytes -> AddRoundKey -> InvMixColumns, the order of
// the FIPS-197 inverse cipher. In the final round (final_round = 1)
// InvMixColumns is bypassed.
// Interface: state_in, round_key, final_round -> state_out.
module aes_inv_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);
  block_t isr, isb, ark, imc;

  aes_inv_shift_rows  u_isr (.state_in(state_in), .state_out(isr));
  aes_inv_sub_bytes   u_isb (.state_in(isr),      .state_out(isb));
  aes_add_round_key   u_ark (.state_in(isb), .round_key(round_key), .state_out(ark));
  aes_inv_mix_columns u_imc (.state_in(ark),      .state_out(imc));

  assign state_out = final_round ? ark : imc;
endmodule
