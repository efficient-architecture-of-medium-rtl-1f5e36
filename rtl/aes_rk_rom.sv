// aes_rk_rom: one round-key ROM sub-module, 4 locations of 8 bits.
//
// Holds one 32-bit column (word) of a round key as four bytes, byte 0 at
// location 0. Forty of these hold round keys 1..10. The datapath only ever
// reads it; it is loaded, all four locations in one cycle, when the key
// schedule produces its word (we = 1). Reads are combinational and return all
// four locations at once, so a group of four sub-modules delivers a full
// 16-byte round key in the cycle it is addressed. The size (4 x 8 bits) is the
// document's; the load port is this design's choice, since on an FPGA the
// contents depend on the key.
// Interface: clk, we, wdata[4] -> rdata[4]; write takes effect at the clock edge.
module aes_rk_rom
  import aes_pkg::*;
(
  input  logic           clk,
  input  logic           we,
  input  logic [3:0][7:0] wdata,   // wdata[3] is location 0 (first byte)
  output logic [3:0][7:0] rdata
);
  byte_t mem [4];

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < 4; i++) mem[i] <= wdata[3 - i];
  end

  always_comb
    for (int i = 0; i < 4; i++) rdata[3 - i] = mem[i];
endmodule
