// tb_aes_sbox: checks all 256 S-box entries against the reference model's
// inverse-search S-box, plus two FIPS-197 table values (S(00)=63, S(53)=ED).
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(din), .out_byte(dout));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    for (int x = 0; x < 256; x++) begin
      din = 8'(x);
      #1;
      check(dout, aes_model::ref_sbox(8'(x)), $sformatf("S(%02h)", x));
    end
    din = 8'h00; #1; check(dout, 8'h63, "S(00) FIPS");
    din = 8'h53; #1; check(dout, 8'hed, "S(53) FIPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
