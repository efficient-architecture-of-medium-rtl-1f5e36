// aes_decrypt_core: round-iterative AES-128 decryption (inverse cipher).
//
// Mirrors aes_encrypt_core with the rounds run backwards: after a block is
// accepted, the next cycle XORs it with round key 10; then nine inverse
// rounds use round keys 9..1, and a final inverse round without
// InvMixColumns uses round key 0 (aes_inv_round). rk_round = 10 - step
// addresses the shared round-key store. The document shows decryption only as
// a result; its datapath here is the standard FIPS-197 inverse cipher.
//
// Timing: handshake in cycle 0, out_valid high in cycle 12 with out_block
// (latency 12); a new block may be accepted in the last round's cycle, so a
// stream runs at one block per 11 cycles.
// in_ready is low while keys_valid is low. No output back-pressure.
module aes_decrypt_core
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
  round_t step;
  logic   active, last, accept;

  assign last     = active && (step == round_t'(NR));
  assign in_ready = keys_valid && (!active || last);
  assign accept   = in_valid && in_ready;
  assign rk_round = round_t'(NR) - step;
  assign busy     = active;

  aes_inv_round u_round (
    .state_in   (state),
    .round_key  (rk),
    .final_round(last),
    .state_out  (round_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      step      <= '0;
      active    <= 1'b0;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      out_valid <= 1'b0;
      if (active) begin
        if (step == '0) state <= state ^ rk;      // AddRoundKey with key 10
        else            state <= round_out;
        step <= step + round_t'(1);
        if (last) begin
          out_valid <= 1'b1;
          out_block <= round_out;
          active    <= 1'b0;
        end
      end
      if (accept) begin
        state  <= in_block;
        step   <= '0;
        active <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) active |-> step <= round_t'(NR));
endmodule
