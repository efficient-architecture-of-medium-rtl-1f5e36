// aes_inv_sbox: the inverse AES S-box (InvSubBytes) for one byte.
//
// A 256-entry lookup table built at elaboration time by inverting the forward
// table (aes_pkg::make_inv_sbox). Used by the decryption datapath only.
// Interface: in_byte -> out_byte, purely combinational.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);
  localparam sbox_table_t INV_SBOX = make_inv_sbox();
  assign out_byte = INV_SBOX[in_byte];
endmodule
