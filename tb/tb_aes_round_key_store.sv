// tb_aes_round_key_store: fills the 40 sub-modules with round keys 1..10 of a
// random key through the write port, then reads every round 0..10 on both
// read ports (different rounds at once) and checks the multiplexer returns
// rk0 for round 0 and the stored key otherwise. Repeats for several keys so a
// stale word would show.
module tb_aes_round_key_store;
  import aes_ref_pkg::*;
  logic clk = 0, wr_en = 0;
  logic [127:0] rk0, wr_key;
  logic [3:0] wr_round;
  logic [1:0][3:0] rd_round;
  logic [1:0][127:0] rd_key;
  int checks = 0, failures = 0;

  aes_round_key_store dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_round = '0; wr_round = '0; wr_key = '0;
    for (int n = 0; n < 5; n++) begin
      logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      rk0 = k;
      for (int r = 1; r <= 10; r++) begin
        wr_en = 1; wr_round = 4'(r); wr_key = aes_model::ref_round_key(k, r);
        @(negedge clk);
      end
      wr_en = 0; wr_key = {$urandom, $urandom, $urandom, $urandom};
      for (int r = 0; r <= 10; r++) begin
        rd_round[0] = 4'(r);
        rd_round[1] = 4'(10 - r);
        #1;
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (rd_key[p] !== aes_model::ref_round_key(k, int'(rd_round[p]))) begin
            failures++;
            $display("FAIL port %0d round %0d got %032h", p, rd_round[p], rd_key[p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
