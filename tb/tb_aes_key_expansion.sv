// tb_aes_key_expansion: self-checking testbench for aes_key_expansion.
//
// Checks all 11 round keys of the FIPS-197 Appendix A.1 key, then the full schedule of
// random keys against the model key expansion.
// A watchdog ends the run as a failure if it hangs.
module tb_aes_key_expansion;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0]  key;
  logic [1407:0] rk;
  m_keys_t       exp_rk;
  aes_key_expansion dut (.key(key), .round_keys(rk));

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
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check(rk[1407 -: 128], key, "round key 0");
    check(rk[1407 - 128 -: 128], 128'ha0fafe1788542cb123a339392a6c7605, "round key 1");
    check(rk[127:0], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "round key 10");
    for (int i = 0; i < 100; i++) begin
      key = (i == 0) ? '0 : (i == 1) ? '1 : rand_block(); #1;
      key_expand(key, exp_rk);
      for (int j = 0; j < 11; j++) check(rk[1407 - 128*j -: 128], exp_rk[j], $sformatf("round key %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
