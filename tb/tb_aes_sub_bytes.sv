// tb_aes_sub_bytes: self-checking testbench for aes_sub_bytes.
//
// Applies the FIPS-197 round-1 SubBytes vector, 300 random states and two corner
// states, and compares with the model S-box on every byte.
// Expected values come from the independent model in aes_model_pkg and from the worked
// example of FIPS-197 (Appendix B). A watchdog ends the run as a failure if it hangs.
module tb_aes_sub_bytes;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0] din, dout;
  aes_sub_bytes dut (.din(din), .dout(dout));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1; check(dout, 128'hd42711aee0bf98f1b8b45de51e415230, "known vector");
    for (int i = 0; i < 300; i++) begin
      din = rand_block(); #1;
      check(dout, sub_bytes(din), "random");
    end
    din = '0; #1; check(dout, sub_bytes(din), "zero");
    din = '1; #1; check(dout, sub_bytes(din), "ones");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
