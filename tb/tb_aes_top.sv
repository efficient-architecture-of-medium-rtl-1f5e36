// tb_aes_top: end-to-end test of aes_top at its default parameters.
//
// Loads keys through the key handshake, streams blocks into the encryption
// and decryption cores at the same time, and checks every result against the
// reference model (FIPS-197 vectors, the 5145ac8e.../65787aec... vector,
// random data), plus an encrypt-then-decrypt round trip. Cycle checks: 12
// cycles from handshake to result, 11 cycles between results of a stream,
// keys usable 11 cycles after a key load. It counts each mechanism of the
// design and fails if one never happened:
//   key loads, blocks held off while round keys are being written, blocks
//   accepted in the last-round cycle of the previous block (overlap), both
//   cores busy at once, and key loads held off while a core is busy.
module tb_aes_top;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_valid = 0, key_ready, keys_valid;
  logic [127:0] key_in = '0;
  logic enc_in_valid = 0, enc_in_ready, enc_out_valid;
  logic [127:0] enc_in_block = '0, enc_out_block;
  logic dec_in_valid = 0, dec_in_ready, dec_out_valid;
  logic [127:0] dec_in_block = '0, dec_out_block;

  int checks = 0, failures = 0, cycle = 0;
  int n_key_loads = 0, n_key_stalls = 0, n_overlap_enc = 0, n_overlap_dec = 0;
  int n_concurrent = 0, n_key_deferred = 0;
  logic [127:0] exp_enc [$], exp_dec [$];
  int acc_enc [$], acc_dec [$], out_enc [$], out_dec [$];
  int key_load_cycle;
  logic [127:0] cur_key;

  aes_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor, sampled at falling edges.
  always @(negedge clk) if (rst_n) begin
    if (key_valid && key_ready) begin
      n_key_loads++;
      key_load_cycle = cycle;
    end
    if (key_valid && !key_ready) n_key_deferred++;
    if ((enc_in_valid && !enc_in_ready) || (dec_in_valid && !dec_in_ready))
      if (!keys_valid) n_key_stalls++;
    if (dut.u_enc.busy && dut.u_dec.busy) n_concurrent++;
    if (enc_in_valid && enc_in_ready) begin
      acc_enc.push_back(cycle);
      if (dut.u_enc.busy) n_overlap_enc++;
    end
    if (dec_in_valid && dec_in_ready) begin
      acc_dec.push_back(cycle);
      if (dut.u_dec.busy) n_overlap_dec++;
    end
    if (enc_out_valid) begin
      int a;
      logic [127:0] e;
      a = acc_enc.pop_front();
      e = exp_enc.pop_front();
      out_enc.push_back(cycle);
      check(cycle - a == 12, $sformatf("enc latency %0d", cycle - a));
      check(enc_out_block == e, $sformatf("enc %032h expected %032h", enc_out_block, e));
    end
    if (dec_out_valid) begin
      int a;
      logic [127:0] e;
      a = acc_dec.pop_front();
      e = exp_dec.pop_front();
      out_dec.push_back(cycle);
      check(cycle - a == 12, $sformatf("dec latency %0d", cycle - a));
      check(dec_out_block == e, $sformatf("dec %032h expected %032h", dec_out_block, e));
    end
  end

  task automatic load_key(logic [127:0] k);
    key_in = k; key_valid = 1;
    #1;
    while (!key_ready) @(negedge clk);
    @(negedge clk);
    key_valid = 0;
    cur_key = k;
    check(!keys_valid, "keys_valid drops after a key load");
    while (!keys_valid) @(negedge clk);
    check(cycle - key_load_cycle == 11, $sformatf("key schedule took %0d cycles", cycle - key_load_cycle));
  endtask

  task automatic send_enc(logic [127:0] pt);
    exp_enc.push_back(aes_model::ref_encrypt(cur_key, pt));
    enc_in_block = pt; enc_in_valid = 1;
    #1;
    while (!enc_in_ready) @(negedge clk);
    @(negedge clk);
    enc_in_valid = 0;
  endtask

  task automatic send_dec(logic [127:0] ct);
    exp_dec.push_back(aes_model::ref_decrypt(cur_key, ct));
    dec_in_block = ct; dec_in_valid = 1;
    #1;
    while (!dec_in_ready) @(negedge clk);
    @(negedge clk);
    dec_in_valid = 0;
  endtask

  task automatic drain();
    while (exp_enc.size() != 0 || exp_dec.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(key_ready && !keys_valid && !enc_in_ready && !dec_in_ready, "state after reset");

    // FIPS-197 Appendix B; a block is offered while the round keys are written.
    cur_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    fork
      load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
      begin repeat (3) @(negedge clk); send_enc(128'h3243f6a8885a308d313198a2e0370734); end
      begin repeat (4) @(negedge clk); send_dec(128'h3925841d02dc09fbdc118597196a0b32); end
    join
    drain();
    check(out_enc.size() == 1 && out_dec.size() == 1, "one result from each core");
    check(enc_out_block == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B ciphertext");
    check(dec_out_block == 128'h3243f6a8885a308d313198a2e0370734, "FIPS-197 B plaintext");

    // Concurrent streams; a key load is requested while both cores run.
    out_enc.delete(); out_dec.delete();
    fork
      for (int n = 0; n < 12; n++) send_enc(rnd128());
      for (int n = 0; n < 12; n++) send_dec(rnd128());
    join
    drain();
    check(out_enc.size() == 12 && out_dec.size() == 12, "all streamed blocks returned");
    for (int n = 1; n < 12; n++) begin
      check(out_enc[n] - out_enc[n-1] == 11, $sformatf("enc spacing %0d", out_enc[n] - out_enc[n-1]));
      check(out_dec[n] - out_dec[n-1] == 11, $sformatf("dec spacing %0d", out_dec[n] - out_dec[n-1]));
    end

    // Key of the published simulation: request the key while a block runs.
    fork
      send_enc(rnd128());
      begin @(negedge clk); @(negedge clk); load_key(128'h65787aecd43ae34e45a55ccdaed67898); end
    join
    drain();
    // cur_key switched after the in-flight block was accepted: check the
    // new key's vector and a round trip.
    send_enc(128'h5145ac8e4a45bde3a45e6a6c7d876543);
    @(negedge clk);
    check(dut.u_enc.state == 128'h343dd6629e7f5eade1fb36a1d3511ddb, "state after the initial key addition");
    drain();
    check(enc_out_block == 128'ha1756505a4ce5fbc8876278561601a07, "ciphertext for 65787aec... key");
    send_dec(enc_out_block);
    drain();
    check(dec_out_block == 128'h5145ac8e4a45bde3a45e6a6c7d876543, "round trip returns the plaintext");

    // FIPS-197 C.1 and a few random keys.
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    send_enc(128'h00112233445566778899aabbccddeeff);
    drain();
    check(enc_out_block == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 ciphertext");
    for (int k = 0; k < 4; k++) begin
      load_key(rnd128());
      fork
        for (int n = 0; n < 3; n++) send_enc(rnd128());
        for (int n = 0; n < 3; n++) send_dec(rnd128());
      join
      drain();
    end

    $display("mechanisms: key_loads=%0d key_stalls=%0d overlap_enc=%0d overlap_dec=%0d concurrent=%0d key_deferred=%0d",
             n_key_loads, n_key_stalls, n_overlap_enc, n_overlap_dec, n_concurrent, n_key_deferred);
    check(n_key_loads == 7, "seven key loads");
    check(n_key_stalls > 0, "block held off during key schedule");
    check(n_overlap_enc > 0, "encryption overlap");
    check(n_overlap_dec > 0, "decryption overlap");
    check(n_concurrent > 0, "both cores busy at once");
    check(n_key_deferred > 0, "key load held off by a busy core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
