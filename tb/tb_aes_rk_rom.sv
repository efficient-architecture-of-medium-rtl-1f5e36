// tb_aes_rk_rom: writes random 4-byte words into the 4x8 ROM sub-module and
// checks they read back in order, and that contents hold while we is low.
module tb_aes_rk_rom;
  logic clk = 0, we = 0;
  logic [3:0][7:0] wdata, rdata;
  logic [31:0] held;
  int checks = 0, failures = 0;

  aes_rk_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      wdata = $urandom; we = 1; held = wdata;
      @(negedge clk);
      we = 0; wdata = $urandom;
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL read %08h exp %08h", rdata, held); end
      @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL hold %08h exp %08h", rdata, held); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
