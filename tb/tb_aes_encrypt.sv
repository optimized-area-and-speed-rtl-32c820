// tb_aes_encrypt: self-checking testbench for aes_encrypt.
//
// Encrypts the FIPS-197 Appendix B and C.1 vectors and random blocks under random keys;
// the round keys are supplied by the model key expansion, so only the cipher rounds are
// under test.
// A watchdog ends the run as a failure if it hangs.
module tb_aes_encrypt;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0]  pt, key, ct;
  logic [1407:0] rk;
  m_keys_t       mk;
  aes_encrypt dut (.plaintext(pt), .round_keys(rk), .ciphertext(ct));

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
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; key_expand(key, mk); rk = pack_keys(mk);
    pt = 128'h3243f6a8885a308d313198a2e0370734; #1;
    check(ct, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 App. B");
    key = 128'h000102030405060708090a0b0c0d0e0f; key_expand(key, mk); rk = pack_keys(mk);
    pt = 128'h00112233445566778899aabbccddeeff; #1;
    check(ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 App. C.1");
    for (int i = 0; i < 200; i++) begin
      key = rand_block(); key_expand(key, mk); rk = pack_keys(mk);
      pt = rand_block(); #1;
      check(ct, encrypt(pt, key), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
