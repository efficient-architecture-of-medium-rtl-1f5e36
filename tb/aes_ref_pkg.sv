// aes_ref_pkg: an independent, software-style AES-128 reference model for the
// testbenches. It works on a 4x4 byte matrix st[row][col] and finds S-box
// entries by searching for the multiplicative inverse (x*y = 1) and applying
// the affine map bit by bit, unlike the table built in the RTL.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   mat_t [4][4];   // [row][col]

  // Static methods of a class are compiled as callable functions rather
  // than expanded at every call site, which keeps testbench builds small.
  class aes_model;
    static logic [7:0] sb_tab [256];
    static logic [7:0] isb_tab [256];
    static bit  tab_ready = 1'b0;

    static function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
      logic [7:0] p = 0;
      for (int i = 0; i < 8; i++) begin
        if (b[i]) p ^= a;
        a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      end
      return p;
    endfunction

    static function automatic void build_tables();
      logic [7:0] inv, s;
      logic [7:0] c = 8'h63;
      for (int x = 0; x < 256; x++) begin
        inv = 0;
        for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
        for (int i = 0; i < 8; i++)
          s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
        sb_tab[x] = s;
      end
      for (int x = 0; x < 256; x++) isb_tab[sb_tab[x]] = 8'(x);
      tab_ready = 1'b1;
    endfunction

    static function automatic logic [7:0] ref_sbox(logic [7:0] x);
      if (!tab_ready) build_tables();
      return sb_tab[x];
    endfunction

    static function automatic logic [7:0] ref_inv_sbox(logic [7:0] x);
      if (!tab_ready) build_tables();
      return isb_tab[x];
    endfunction

    static function automatic void to_mat(blk_t b, output mat_t m);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) m[r][c] = b[127 - 8*(4*c+r) -: 8];
    endfunction

    static function automatic blk_t from_mat(mat_t m);
      blk_t b;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) b[127 - 8*(4*c+r) -: 8] = m[r][c];
      return b;
    endfunction

    // Round key r (0..10) of the FIPS-197 key schedule.
    static function automatic blk_t ref_round_key(blk_t key, int r);
      logic [31:0] w [44];
      logic [31:0] t;
      logic [7:0]  rc = 8'h01;
      for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
      for (int i = 4; i < 44; i++) begin
        t = w[i-1];
        if (i % 4 == 0) begin
          t = {t[23:0], t[31:24]};
          t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
          t[31:24] ^= rc;
          rc = gmul(rc, 8'h02);
        end
        w[i] = w[i-4] ^ t;
      end
      return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    endfunction

    static function automatic blk_t ref_sub_bytes(blk_t s);
      for (int i = 0; i < 16; i++) s[8*i +: 8] = ref_sbox(s[8*i +: 8]);
      return s;
    endfunction

    static function automatic blk_t ref_shift_rows(blk_t s);
      mat_t a, b;
      to_mat(s, a);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) b[r][c] = a[r][(c+r)%4];
      return from_mat(b);
    endfunction

    static function automatic blk_t ref_mix_columns(blk_t s);
      mat_t a, b;
      logic [7:0] m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
      to_mat(s, a);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          b[r][c] = 0;
          for (int k = 0; k < 4; k++) b[r][c] ^= gmul(m[r][k], a[k][c]);
        end
      return from_mat(b);
    endfunction

    static function automatic blk_t ref_encrypt(blk_t key, blk_t pt);
      blk_t s = pt ^ ref_round_key(key, 0);
      for (int r = 1; r <= 10; r++) begin
        s = ref_shift_rows(ref_sub_bytes(s));
        if (r != 10) s = ref_mix_columns(s);
        s ^= ref_round_key(key, r);
      end
      return s;
    endfunction

    // Decryption by the equivalent direct inverse of each step.
    static function automatic blk_t ref_decrypt(blk_t key, blk_t ct);
      mat_t a, b;
      logic [7:0] m [4][4] = '{'{14,11,13,9}, '{9,14,11,13}, '{13,9,14,11}, '{11,13,9,14}};
      blk_t s = ct;
      for (int r = 10; r >= 1; r--) begin
        s ^= ref_round_key(key, r);
        if (r != 10) begin
          to_mat(s, a);
          for (int c = 0; c < 4; c++)
            for (int rr = 0; rr < 4; rr++) begin
              b[rr][c] = 0;
              for (int k = 0; k < 4; k++) b[rr][c] ^= gmul(m[rr][k], a[k][c]);
            end
          s = from_mat(b);
        end
        to_mat(s, a);
        for (int rr = 0; rr < 4; rr++) for (int c = 0; c < 4; c++) b[rr][(c+rr)%4] = a[rr][c];
        s = from_mat(b);
        for (int i = 0; i < 16; i++) s[8*i +: 8] = ref_inv_sbox(s[8*i +: 8]);
      end
      return s ^ ref_round_key(key, 0);
    endfunction
  endclass

endpackage
