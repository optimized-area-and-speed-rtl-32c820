// tb_misr: self-checking testbench for misr.
//
// Feeds 500 random response words (with random enable gaps) and checks the signature every
// cycle against the model recurrence. It then shows the compaction property: replaying the
// same stream with a single flipped bit must end in a different signature.
// A watchdog ends the run as a failure after 20000 cycles.
module tb_misr;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [127:0] din = '0, sig, expected, golden;
  logic [127:0] stream [200];
  always #5 clk = ~clk;

  misr dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .signature(sig));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 0; en = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    check(sig, '0, "reset value");
  endtask

  initial begin
    do_reset();
    expected = '0;
    for (int i = 0; i < 500; i++) begin
      en  = ($urandom % 4) != 0;
      din = rand_block();
      @(negedge clk);
      if (en) expected = misr_step(expected, din);
      check(sig, expected, "signature");
    end
    // Aliasing check: one flipped bit in one word changes the final signature.
    for (int i = 0; i < 200; i++) stream[i] = rand_block();
    for (int pass = 0; pass < 2; pass++) begin
      do_reset();
      en = 1;
      for (int i = 0; i < 200; i++) begin
        din = stream[i];
        if (pass == 1 && i == 77) din[13] = ~din[13];
        @(negedge clk);
      end
      en = 0;
      if (pass == 0) golden = sig;
    end
    checks++;
    if (sig == golden) begin
      failures++;
      $display("FAIL single-bit error not seen in signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
