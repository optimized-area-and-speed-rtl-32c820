// tb_aes_add_round_key: self-checking testbench for aes_add_round_key.
//
// Checks the FIPS-197 initial AddRoundKey and random state/key pairs against XOR.
// A watchdog ends the run as a failure if it hangs.
module tb_aes_add_round_key;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0] din, key, dout;
  aes_add_round_key dut (.din(din), .round_key(key), .dout(dout));

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
    din = 128'h3243f6a8885a308d313198a2e0370734; key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check(dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS-197 round 0");
    for (int i = 0; i < 300; i++) begin
      din = rand_block(); key = rand_block(); #1;
      check(dout, din ^ key, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
