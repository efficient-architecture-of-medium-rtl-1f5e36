// aes_round_key_store: round-key storage in ROM sub-modules plus the
// round-key multiplexer.
//
// NUM_ROMS aes_rk_rom sub-modules (40 for AES-128) hold round keys 1..10:
// sub-module g keeps word g % 4 of round key g / 4 + 1, so sub-modules
// 4(r-1) .. 4(r-1)+3 together hold round key r. They are loaded from the key
// schedule's write port (wr_en, wr_round, wr_key), one round key per cycle.
// Round key 0, the cipher key, is not stored: it arrives on rk0 straight from
// the key-expansion module. Each read port p has a multiplexer that returns
// rk0 when rd_round[p] is 0 and the four sub-modules of round rd_round[p]
// otherwise. Storing keys 1..10 in 40 4x8 ROMs and the multiplexer between
// the direct key and the ROMs follow the document; the number of read ports
// (N_READ, one per datapath) is this design's choice.
// Timing: reads are combinational; a write becomes visible after the clock edge.
module aes_round_key_store
  import aes_pkg::*;
#(
  parameter int unsigned NUM_ROMS = 40,   // 4 words x NR round keys
  parameter int unsigned N_READ   = 2
) (
  input  logic                    clk,
  input  block_t                  rk0,
  input  logic                    wr_en,
  input  round_t                  wr_round,
  input  block_t                  wr_key,
  input  round_t [N_READ-1:0]     rd_round,
  output block_t [N_READ-1:0]     rd_key
);
  localparam int unsigned NKEYS = NUM_ROMS / 4;

  word_t rom_q [NUM_ROMS];

  for (genvar g = 0; g < NUM_ROMS; g++) begin : g_rom
    logic we;
    assign we = wr_en && (wr_round == round_t'(g / 4 + 1));
    aes_rk_rom u_rom (
      .clk  (clk),
      .we   (we),
      .wdata(wr_key[127 - 32*(g % 4) -: 32]),
      .rdata(rom_q[g])
    );
  end

  for (genvar p = 0; p < N_READ; p++) begin : g_rd
    always_comb begin
      rd_key[p] = rk0;
      for (int unsigned r = 1; r <= NKEYS; r++)
        if (rd_round[p] == round_t'(r))
          rd_key[p] = {rom_q[4*(r-1)], rom_q[4*(r-1)+1], rom_q[4*(r-1)+2], rom_q[4*(r-1)+3]};
    end
  end
endmodule
