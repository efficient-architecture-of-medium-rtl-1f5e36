// aes_round: one AES encryption round, combinational.
//
// SubBytes -> ShiftRows -> MixColumns -> AddRoundKey, the order of the
// round in the AES flow. In the final round (final_round = 1) MixColumns is
// bypassed, as the last round of AES leaves it out. The encryption core
// applies this round once per clock cycle.
// Interface: state_in, round_key, final_round -> state_out.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);
  block_t sb, sr, mc, pre_ark;

  aes_sub_bytes     u_sb  (.state_in(state_in), .state_out(sb));
  aes_shift_rows    u_sr  (.state_in(sb),       .state_out(sr));
  aes_mix_columns   u_mc  (.state_in(sr),       .state_out(mc));

  assign pre_ark = final_round ? sr : mc;

  aes_add_round_key u_ark (.state_in(pre_ark), .round_key(round_key), .state_out(state_out));
endmodule
