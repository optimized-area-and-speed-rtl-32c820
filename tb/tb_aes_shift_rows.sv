// tb_aes_shift_rows: self-checking testbench for aes_shift_rows.
//
// Checks the FIPS-197 round-1 ShiftRows vector and random states.
// Expected values come from the independent model in aes_model_pkg and from the worked
// example of FIPS-197 (Appendix B). A watchdog ends the run as a failure if it hangs.
module tb_aes_shift_rows;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0] din, dout;
  aes_shift_rows dut (.din(din), .dout(dout));

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
    din = 128'hd42711aee0bf98f1b8b45de51e415230; #1; check(dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "known vector");
    din = 128'h000102030405060708090a0b0c0d0e0f; #1; check(dout, 128'h00050a0f04090e03080d02070c01060b, "known vector");
    for (int i = 0; i < 300; i++) begin
      din = rand_block(); #1;
      check(dout, shift_rows(din), "random");
    end
    din = '0; #1; check(dout, shift_rows(din), "zero");
    din = '1; #1; check(dout, shift_rows(din), "ones");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
