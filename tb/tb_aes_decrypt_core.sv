// tb_aes_decrypt_core: drives the decryption core with round keys from the
// reference key schedule (a behavioural stand-in for the round-key store).
// Checks that the FIPS-197 Appendix B and C.1 ciphertexts, the ciphertext
// of the 5145ac8e.../65787aec... vector and random blocks decrypt to the
// reference model's inverse cipher output, the 12-cycle latency from handshake to out_valid, a
// back-to-back stream at one block per 11 cycles, and that in_ready stays low
// while keys_valid is low.
module tb_aes_decrypt_core;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, keys_valid = 0, in_valid = 0, in_ready, out_valid, busy;
  logic [127:0] in_block, out_block, rk;
  logic [3:0] rk_round;
  logic [127:0] rks [11];
  logic [127:0] exp_q [$];
  int cycle = 0, accept_cycle [$], out_cycles [$];
  int checks = 0, failures = 0;

  aes_decrypt_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  assign rk = (rk_round <= 10) ? rks[rk_round] : '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_key(logic [127:0] k);
    for (int r = 0; r <= 10; r++) rks[r] = aes_model::ref_round_key(k, r);
  endtask

  // Scoreboard, sampled at falling edges: results in order, 12 cycles
  // after the handshake cycle (out_valid follows the 12th rising edge).
  always @(negedge clk) begin
    if (in_valid && in_ready) accept_cycle.push_back(cycle);
    if (rst_n && out_valid) begin
      int a;
      logic [127:0] e;
      out_cycles.push_back(cycle);
      a = accept_cycle.pop_front();
      e = exp_q.pop_front();
      check(cycle - a == 12, $sformatf("latency %0d, expected 12", cycle - a));
      check(out_block == e, $sformatf("pt %032h expected %032h", out_block, e));
    end
  end

  // Offer a block at a falling edge and hold it until it is taken.
  task automatic send(logic [127:0] k, logic [127:0] pt);
    exp_q.push_back(aes_model::ref_decrypt(k, pt));
    in_block = pt; in_valid = 1;
    #1;  // let in_ready settle
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_block = '0;
    set_key(128'h0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid = 1;
    repeat (3) begin @(negedge clk); check(!in_ready && !busy, "no accept without keys"); end
    in_valid = 0;
    // FIPS-197 Appendix B
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c); keys_valid = 1;
    check(aes_model::ref_encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
          == 128'h3925841d02dc09fbdc118597196a0b32, "reference model vs FIPS-197 B");
    check(aes_model::ref_decrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32)
          == 128'h3243f6a8885a308d313198a2e0370734, "reference inverse vs FIPS-197 B");
    send(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32);
    repeat (15) @(negedge clk);
    // FIPS-197 C.1
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    check(aes_model::ref_encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model vs FIPS-197 C.1");
    send(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    repeat (15) @(negedge clk);
    // Key and plaintext of the published simulation, standard AES-128 result
    set_key(128'h65787aecd43ae34e45a55ccdaed67898);
    check(aes_model::ref_encrypt(128'h65787aecd43ae34e45a55ccdaed67898, 128'h5145ac8e4a45bde3a45e6a6c7d876543)
          == 128'ha1756505a4ce5fbc8876278561601a07, "reference model vs known ciphertext");
    send(128'h65787aecd43ae34e45a55ccdaed67898, 128'ha1756505a4ce5fbc8876278561601a07);
    repeat (15) @(negedge clk);
    // Back-to-back stream under a random key
    begin
      logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      set_key(k);
      out_cycles.delete();
      for (int n = 0; n < 20; n++) send(k, {$urandom, $urandom, $urandom, $urandom});
      repeat (15) @(negedge clk);
      check(out_cycles.size() == 20, "all streamed blocks came out");
      for (int n = 1; n < out_cycles.size(); n++)
        check(out_cycles[n] - out_cycles[n-1] == 11,
              $sformatf("stream spacing %0d, expected 11", out_cycles[n] - out_cycles[n-1]));
    end
    check(exp_q.size() == 0, "every block produced a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

