// tb_ora_compare: self-checking testbench for ora_compare.
//
// Compares equal words (no fault), words differing in every single bit position
// (fault and a one-hot diff) and random pairs.
// A watchdog ends the run as a failure if it hangs.
module tb_ora_compare;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0] p, t, d;
  logic         f;
  ora_compare dut (.practical(p), .theoretical(t), .diff(d), .fault(f));

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
    for (int i = 0; i < 50; i++) begin
      p = rand_block(); t = p; #1;
      check(d, '0, "equal diff"); check({127'b0, f}, 128'd0, "equal flag");
    end
    for (int b = 0; b < 128; b++) begin
      p = rand_block(); t = p ^ (128'd1 << b); #1;
      check(d, 128'd1 << b, "one-bit diff"); check({127'b0, f}, 128'd1, "one-bit flag");
    end
    for (int i = 0; i < 50; i++) begin
      p = rand_block(); t = rand_block(); #1;
      check(d, p ^ t, "random diff"); check({127'b0, f}, {127'b0, p != t}, "random flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
