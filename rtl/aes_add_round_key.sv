// aes_add_round_key: AddRoundKey, the bitwise XOR of the state with a
// 128-bit round key. Combinational.
// Interface: state_in, round_key -> state_out.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  assign state_out = state_in ^ round_key;
endmodule
