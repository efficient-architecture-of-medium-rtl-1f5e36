// tb_aes_sub_bytes: FIPS-197 Appendix B round-1 SubBytes example plus random
// states checked byte by byte against the reference S-box.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.state_in(din), .state_out(dout));

  task automatic check(logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL in %032h: got %032h expected %032h", din, got, exp);
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
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check(dout, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom}; #1;
      check(dout, aes_model::ref_sub_bytes(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
