// tb_lfsr: self-checking testbench for lfsr.
//
// Resets the register, checks the seed, then steps it 2000 times against the model
// recurrence (taps 128, 126, 101, 99). It also checks that the state holds while en is
// low, that it is never zero, and that the first 2000 states contain no repeat of the seed.
// A watchdog ends the run as a failure after 20000 cycles.
module tb_lfsr;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [127:0] state, expected;
  always #5 clk = ~clk;

  lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .state(state));

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(state, 128'h1, "seed after reset");
    expected = 128'h1;
    en = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      expected = lfsr_step(expected);
      check(state, expected, "step");
      checks++;
      if (state == '0 || state == 128'h1) begin
        failures++;
        $display("FAIL zero state or early repeat at step %0d", i);
      end
      if (i % 500 == 250) begin
        en = 0;
        repeat (3) @(negedge clk);
        check(state, expected, "hold");
        en = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
