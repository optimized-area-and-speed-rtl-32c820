// tb_aes_inv_mix_columns: self-checking testbench for aes_inv_mix_columns.
//
// Checks the inverse of the FIPS-197 round-1 MixColumns vector and random states
// against a direct product with the matrix (0e 0b 0d 09).
// Expected values come from the independent model in aes_model_pkg and from the worked
// example of FIPS-197 (Appendix B). A watchdog ends the run as a failure if it hangs.
module tb_aes_inv_mix_columns;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0] din, dout;
  aes_inv_mix_columns dut (.din(din), .dout(dout));

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
    din = 128'h046681e5e0cb199a48f8d37a2806264c; #1; check(dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "known vector");
    for (int i = 0; i < 300; i++) begin
      din = rand_block(); #1;
      check(dout, mix_columns(din, 1), "random");
    end
    din = '0; #1; check(dout, mix_columns(din, 1), "zero");
    din = '1; #1; check(dout, mix_columns(din, 1), "ones");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
