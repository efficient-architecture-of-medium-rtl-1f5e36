// tb_aes_key_expansion: loads keys (FIPS-197 Appendix A.1 key, the
// 65787aec... key and random keys) and checks every written round key, its
// round number, the cycle it appears in (round key r in cycle r after the
// load), rk0, and keys_valid rising 11 cycles after the load.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, key_load = 0;
  logic [127:0] key_in, rk0, wr_key;
  logic wr_en, busy, keys_valid;
  logic [3:0] wr_round;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(logic [127:0] k);
    @(negedge clk);
    key_in = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    key_in = '0;
    check(rk0 == k, "rk0 holds the cipher key");
    for (int r = 1; r <= 10; r++) begin
      check(wr_en && busy && !keys_valid, $sformatf("write strobe for round %0d", r));
      check(wr_round == 4'(r), $sformatf("wr_round %0d got %0d", r, wr_round));
      check(wr_key == aes_model::ref_round_key(k, r),
            $sformatf("round key %0d got %032h exp %032h", r, wr_key, aes_model::ref_round_key(k, r)));
      @(negedge clk);
    end
    check(!wr_en && !busy && keys_valid, "keys_valid 11 cycles after load");
    repeat (3) @(negedge clk);
    check(!wr_en && keys_valid && rk0 == k, "idle after schedule");
  endtask

  initial begin
    key_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!keys_valid && !busy, "reset state");
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(aes_model::ref_round_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 10) ==
          128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference FIPS A.1 round key 10");
    run_key(128'h65787aecd43ae34e45a55ccdaed67898);
    for (int n = 0; n < 10; n++) run_key({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
