// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 modules.
//
// A 128-bit block travels on a bus as 16 bytes with byte 0 in bits [127:120]
// and byte 15 in bits [7:0]. Byte i sits in row (i % 4), column (i / 4) of the
// 4x4 state, so the state is filled column by column, as in FIPS-197.
// The S-box tables are not typed in: make_sbox() builds them at elaboration
// time from the field inverse and the affine map that define them.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [3:0]   round_t;            // round index 0..10

  localparam int unsigned NR       = 10;    // rounds for a 128-bit key
  localparam int unsigned NB_BYTES = 16;    // bytes per block

  typedef logic [255:0][7:0] sbox_table_t;  // entry x is S(x)

  // Multiply by x (i.e. by 2) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Byte i of a block (byte 0 is the most significant).
  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  // Forward S-box: multiplicative inverse (0 maps to 0) followed by the
  // affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
  // The inverse comes from exp/log tables over the generator 3.
  function automatic sbox_table_t make_sbox();
    sbox_table_t t;
    byte_t       exp_t [256];
    int unsigned log_t [256];
    byte_t       p, inv, s;
    p = 8'h01;
    for (int unsigned i = 0; i < 256; i++) begin
      exp_t[i] = p;
      log_t[i] = 0;
    end
    for (int unsigned i = 0; i < 255; i++) begin
      exp_t[i] = p;
      log_t[p] = i;
      p = p ^ xtime(p);                     // p * 3
    end
    for (int unsigned x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : exp_t[(255 - log_t[x]) % 255];
      s   = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]}
                ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      t[x] = s;
    end
    return t;
  endfunction

  // Inverse S-box: the forward table read backwards.
  function automatic sbox_table_t make_inv_sbox();
    sbox_table_t f, t;
    f = make_sbox();
    for (int unsigned x = 0; x < 256; x++) t[f[x]] = 8'(x);
    return t;
  endfunction

endpackage
