// aes_top: AES-128 encryption and decryption with round keys held in ROM.
//
// The key-expansion module turns a loaded 128-bit key into round keys 1..10,
// one per cycle, and writes them into 40 4x8-bit ROM sub-modules
// (aes_round_key_store). Round key 0 bypasses the ROMs. The encryption core
// and the decryption core each run one round per cycle and fetch their round
// key through their own port of the round-key multiplexer, so both can work
// at the same time under the same key.
//
// Key load: key_valid/key_ready handshake. key_ready is high only when the
// key schedule and both cores are idle; after a load, keys_valid (and so
// enc_in_ready/dec_in_ready) stays low for 10 cycles while the new round keys
// are written. A key load takes priority over a block offered in the same
// cycle. Each core: in_valid/in_ready handshake, a one-cycle out_valid pulse
// 12 cycles after the handshake cycle, one block per 11 cycles when streaming.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // key load
  input  logic   key_valid,
  output logic   key_ready,
  input  block_t key_in,
  output logic   keys_valid,
  // encryption
  input  logic   enc_in_valid,
  output logic   enc_in_ready,
  input  block_t enc_in_block,
  output logic   enc_out_valid,
  output block_t enc_out_block,
  // decryption
  input  logic   dec_in_valid,
  output logic   dec_in_ready,
  input  block_t dec_in_block,
  output logic   dec_out_valid,
  output block_t dec_out_block
);
  block_t rk0, wr_key;
  logic   wr_en, ke_busy, ke_valid, key_load;
  logic   enc_busy, dec_busy, core_keys_valid;
  round_t wr_round;
  round_t [1:0] rd_round;
  block_t [1:0] rd_key;

  assign key_ready       = !ke_busy && !enc_busy && !dec_busy;
  assign key_load        = key_valid && key_ready;
  assign core_keys_valid = ke_valid && !key_load;
  assign keys_valid      = ke_valid;

  aes_key_expansion u_kexp (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_load  (key_load),
    .key_in    (key_in),
    .rk0       (rk0),
    .wr_en     (wr_en),
    .wr_round  (wr_round),
    .wr_key    (wr_key),
    .busy      (ke_busy),
    .keys_valid(ke_valid)
  );

  aes_round_key_store #(.NUM_ROMS(4 * NR), .N_READ(2)) u_store (
    .clk     (clk),
    .rk0     (rk0),
    .wr_en   (wr_en),
    .wr_round(wr_round),
    .wr_key  (wr_key),
    .rd_round(rd_round),
    .rd_key  (rd_key)
  );

  aes_encrypt_core u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .keys_valid(core_keys_valid),
    .in_valid  (enc_in_valid),
    .in_ready  (enc_in_ready),
    .in_block  (enc_in_block),
    .out_valid (enc_out_valid),
    .out_block (enc_out_block),
    .rk_round  (rd_round[0]),
    .rk        (rd_key[0]),
    .busy      (enc_busy)
  );

  aes_decrypt_core u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .keys_valid(core_keys_valid),
    .in_valid  (dec_in_valid),
    .in_ready  (dec_in_ready),
    .in_block  (dec_in_block),
    .out_valid (dec_out_valid),
    .out_block (dec_out_block),
    .rk_round  (rd_round[1]),
    .rk        (rd_key[1]),
    .busy      (dec_busy)
  );

  // The round keys never change under a block in flight.
  assert property (@(posedge clk) disable iff (!rst_n) key_load |-> !enc_busy && !dec_busy);
endmodule
