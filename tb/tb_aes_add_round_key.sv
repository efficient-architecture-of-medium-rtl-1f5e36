// tb_aes_add_round_key: FIPS-197 Appendix B initial AddRoundKey example plus
// random state/key pairs.
module tb_aes_add_round_key;
  logic [127:0] din, key, dout;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state_in(din), .round_key(key), .state_out(dout));

  task automatic check(logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL got %032h expected %032h", dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int n = 0; n < 100; n++) begin
      logic [127:0] exp;
      din = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) exp[b] = (din[b] != key[b]);
      #1;
      check(exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
