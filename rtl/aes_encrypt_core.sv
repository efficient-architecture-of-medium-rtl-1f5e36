// aes_encrypt_core: round-iterative AES-128 encryption datapath and control.
//
// One 128-bit state register and one combinational round (aes_round). A block
// is accepted when in_valid and in_ready are both high. In the next cycle the
// state is XORed with round key 0; in each of the following ten cycles one
// round is applied with round key r = 1..10, the tenth without MixColumns.
// The round number drives rk_round, the address of the round-key
// multiplexer, which returns rk combinationally.
//
// Timing: if in_valid and in_ready are high in cycle 0, the initial key
// addition happens in cycle 1, rounds 1..10 in cycles 2..11, and out_valid is
// high in cycle 12 with out_block, which then holds until the next result
// (latency 12). A new block may be accepted in the cycle of round 10, so a
// stream runs at one block per 11 cycles (128/11 bits per clock; 1.2 Gbit/s
// needs a clock of about 103 MHz).
// in_ready is low while keys_valid is low. There is no output back-pressure.
// The flow of rounds follows the document; the one-round-per-cycle
// iteration, the handshake and the overlap are this design's choices.
module aes_encrypt_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   keys_valid,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_block,
  output logic   out_valid,
  output block_t out_block,
  output round_t rk_round,
  input  block_t rk,
  output logic   busy
);
  block_t state, round_out;
  round_t rnd;
  logic   active, last, accept;

  assign last     = active && (rnd == round_t'(NR));
  assign in_ready = keys_valid && (!active || last);
  assign accept   = in_valid && in_ready;
  assign rk_round = rnd;
  assign busy     = active;

  aes_round u_round (
    .state_in   (state),
    .round_key  (rk),
    .final_round(last),
    .state_out  (round_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      rnd       <= '0;
      active    <= 1'b0;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      out_valid <= 1'b0;
      if (active) begin
        if (rnd == '0) state <= state ^ rk;       // initial AddRoundKey
        else           state <= round_out;
        rnd <= rnd + round_t'(1);
        if (last) begin
          out_valid <= 1'b1;
          out_block <= round_out;
          active    <= 1'b0;
        end
      end
      if (accept) begin
        state  <= in_block;
        rnd    <= '0;
        active <= 1'b1;
      end
    end
  end

  // The round counter never passes the last round.
  assert property (@(posedge clk) disable iff (!rst_n) active |-> rnd <= round_t'(NR));
endmodule
