// tb_aes128_core: self-checking testbench for aes128_core.
//
// Drives plaintext, ciphertext and key together: known FIPS-197 vectors in both
// directions, random blocks against the model, and round trips (decrypting the produced
// ciphertext must give the plaintext back). The exposed key schedule is checked too.
// A watchdog ends the run as a failure if it hangs.
module tb_aes128_core;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;
  logic [127:0]  pt, ct_in, key, ct, pt_out;
  logic [1407:0] rk;
  m_keys_t       mk;
  aes128_core dut (.input_encrypt(pt), .input_decrypt(ct_in), .input_key(key), .out_keys(rk),
                   .output_encrypt(ct), .output_decrypt(pt_out));

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
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt = 128'h00112233445566778899aabbccddeeff; ct_in = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; #1;
    check(ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 encrypt");
    check(pt_out, 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypt");
    for (int i = 0; i < 150; i++) begin
      key = rand_block(); pt = rand_block(); ct_in = rand_block(); #1;
      check(ct, encrypt(pt, key), "random encrypt");
      check(pt_out, decrypt(ct_in, key), "random decrypt");
      key_expand(key, mk);
      check(rk[127:0], mk[10], "last round key");
      ct_in = ct; #1;
      check(pt_out, pt, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
