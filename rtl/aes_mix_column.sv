// aes_mix_column: MixColumns for one 4-byte column.
//
// Multiplies the column by the circulant matrix [2 3 1 1; 1 2 3 1; 1 1 2 3;
// 3 1 1 2] over GF(2^8). Instead of four separate multiplications per output,
// it shares work: t = a0^a1^a2^a3, then b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1)).
// This needs four xtime units and a handful of XORs per column; this sharing
// is this design's choice for the "efficient module" the document mentions.
// Interface: col_in (a0 in [31:24]) -> col_out, combinational.
module aes_mix_column
  import aes_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);
  byte_t a [4];
  byte_t t;
  always_comb begin
    for (int i = 0; i < 4; i++) a[i] = col_in[31 - 8*i -: 8];
    t = a[0] ^ a[1] ^ a[2] ^ a[3];
    for (int i = 0; i < 4; i++)
      col_out[31 - 8*i -: 8] = a[i] ^ t ^ xtime(a[i] ^ a[(i + 1) % 4]);
  end
endmodule
