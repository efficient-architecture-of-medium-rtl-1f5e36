// aes_sbox: the AES SubBytes substitution for one byte.
//
// A 256-entry lookup table, built at elaboration time by aes_pkg::make_sbox()
// from the GF(2^8) inverse and the FIPS-197 affine map, and read
// combinationally. A synthesis tool maps it to a LUT/ROM. The document only
// names SubBytes; the table form is this design's choice.
// Interface: in_byte -> out_byte, purely combinational.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);
  localparam sbox_table_t SBOX = make_sbox();
  assign out_byte = SBOX[in_byte];
endmodule
