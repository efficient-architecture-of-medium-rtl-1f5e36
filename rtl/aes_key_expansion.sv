// aes_key_expansion: AES-128 key schedule, one round key per clock cycle.
//
// A pulse on key_load captures the 128-bit cipher key. The key itself is
// round key 0 and stays on rk0 for as long as the key is in use; it feeds the
// round-key multiplexer directly. Over the next 10 cycles the module computes
// round keys 1..10, one per cycle, and presents each on wr_key with wr_en high
// and its number on wr_round, so that the round-key ROMs can capture it.
// keys_valid rises in the cycle after round key 10 was written and stays high
// until the next key_load.
//
// One step of the schedule: t = SubWord(RotWord(w3)) ^ {rcon, 24'h0};
// w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. rcon starts at
// 0x01 and is doubled in GF(2^8) each step. Four aes_sbox instances serve
// SubWord. Computing the keys once per key and storing them follows the
// document; doing it serially, one key per cycle, is this design's choice.
//
// Timing: key_load in cycle 0; wr_en in cycles 1..10 (round keys 1..10);
// keys_valid from cycle 11. busy is high in cycles 1..10.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_in,
  output block_t rk0,
  output logic   wr_en,
  output round_t wr_round,
  output block_t wr_key,
  output logic   busy,
  output logic   keys_valid
);
  block_t cur_key;            // last round key produced
  byte_t  rcon;
  round_t rnd;                // number of the key being produced
  word_t  w [4];
  word_t  rot, sub, t;
  block_t next_key;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = cur_key[127 - 32*i -: 32];
    rot = {w[3][23:0], w[3][31:24]};
  end

  for (genvar i = 0; i < 4; i++) begin : g_subword
    aes_sbox u_sbox (.in_byte(rot[31 - 8*i -: 8]), .out_byte(sub[31 - 8*i -: 8]));
  end

  always_comb begin
    word_t n0, n1, n2, n3;
    t        = sub ^ {rcon, 24'h0};
    n0       = w[0] ^ t;
    n1       = w[1] ^ n0;
    n2       = w[2] ^ n1;
    n3       = w[3] ^ n2;
    next_key = {n0, n1, n2, n3};
  end

  assign wr_en    = busy;
  assign wr_round = rnd;
  assign wr_key   = next_key;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rk0        <= '0;
      cur_key    <= '0;
      rcon       <= 8'h01;
      rnd        <= '0;
      busy       <= 1'b0;
      keys_valid <= 1'b0;
    end else if (key_load) begin
      rk0        <= key_in;
      cur_key    <= key_in;
      rcon       <= 8'h01;
      rnd        <= round_t'(1);
      busy       <= 1'b1;
      keys_valid <= 1'b0;
    end else if (busy) begin
      cur_key <= next_key;
      rcon    <= xtime(rcon);
      if (rnd == round_t'(NR)) begin
        busy       <= 1'b0;
        keys_valid <= 1'b1;
        rnd        <= '0;
      end else begin
        rnd <= rnd + round_t'(1);
      end
    end
  end
endmodule
