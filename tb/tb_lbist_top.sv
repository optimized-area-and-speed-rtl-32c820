// tb_lbist_top: end-to-end testbench for lbist_top at its default (full) size.
//
// Sequence: reset; mission mode with the FIPS-197 Appendix B/C.1 vectors and random
// blocks; a self-test run of 300 LFSR patterns; a switch back to mission mode and again
// to self-test; injected faults in the encryption and decryption results. Every cycle the
// outputs are compared with a cycle-level model built from aes_model_pkg: out1/out2 one
// cycle after the stimulus (the one-cycle latency), the reference outputs, the fault flags,
// the LFSR pattern sequence and both MISR signatures.
// Mechanisms counted (each must occur at least once): self-test cycles, mission cycles,
// mode switches, MISR compaction steps, encryption faults flagged, decryption faults
// flagged. A watchdog ends the run as a failure after 20000 cycles.
module tb_lbist_top;
  import aes_model_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 0, rst_n = 0, ctrl = 0;
  logic [1:0] fault_inject = '0;
  logic [127:0] input_encrypt = '0, input_decrypt = '0, input_key = '0;
  logic [127:0] out1, out2, out1_f, out2_f, sig_en, sig_de, pattern;
  logic faulten, faultde, valid;
  always #5 clk = ~clk;

  lbist_top dut (.*);

  // Cycle-level model state.
  logic [127:0] m_pat, m_out1, m_out2, m_out1_f, m_out2_f, m_sig_en, m_sig_de;
  logic         m_valid, m_test;
  logic         prev_ctrl;

  int n_selftest = 0, n_mission = 0, n_switch = 0, n_misr = 0, n_faulten = 0, n_faultde = 0;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply the current stimulus for one clock edge and compare afterwards.
  task automatic step();
    logic [127:0] pt, ct, key;
    pt  = ctrl ? m_pat : input_encrypt;
    ct  = ctrl ? m_pat : input_decrypt;
    key = ctrl ? m_pat : input_key;
    if (m_valid && m_test) begin
      m_sig_en = misr_step(m_sig_en, m_out1);
      m_sig_de = misr_step(m_sig_de, m_out2);
      n_misr++;
    end
    m_out1_f = encrypt(pt, key);
    m_out2_f = decrypt(ct, key);
    m_out1   = m_out1_f ^ {127'b0, fault_inject[0]};
    m_out2   = m_out2_f ^ {127'b0, fault_inject[1]};
    m_valid  = 1'b1;
    m_test   = ctrl;
    if (ctrl) begin m_pat = lfsr_step(m_pat); n_selftest++; end else n_mission++;
    if (ctrl != prev_ctrl) n_switch++;
    prev_ctrl = ctrl;
    @(negedge clk);
    check(out1, m_out1, "out1");
    check(out2, m_out2, "out2");
    check(out1_f, m_out1_f, "out1_f");
    check(out2_f, m_out2_f, "out2_f");
    check(pattern, m_pat, "pattern");
    check(sig_en, m_sig_en, "sig_en");
    check(sig_de, m_sig_de, "sig_de");
    check({126'b0, faulten, faultde}, {126'b0, m_out1 != m_out1_f, m_out2 != m_out2_f}, "fault flags");
    if (faulten) n_faulten++;
    if (faultde) n_faultde++;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("mechanism %-28s occurred %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    m_pat = 128'h1; m_sig_en = '0; m_sig_de = '0; m_valid = 0; m_test = 0; prev_ctrl = 0;
    repeat (2) @(negedge clk);
    check({127'b0, valid}, 128'd0, "valid low in reset");
    rst_n = 1;

    // Mission mode, known answers.
    input_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    input_encrypt = 128'h3243f6a8885a308d313198a2e0370734;
    input_decrypt = 128'h3925841d02dc09fbdc118597196a0b32;
    step();
    check(out1, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B encrypt");
    check(out2, 128'h3243f6a8885a308d313198a2e0370734, "FIPS-197 B decrypt");
    input_key = 128'h000102030405060708090a0b0c0d0e0f;
    input_encrypt = 128'h00112233445566778899aabbccddeeff;
    input_decrypt = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    step();
    check(out1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 encrypt");
    check(out2, 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypt");
    for (int i = 0; i < 20; i++) begin
      input_key = rand_block(); input_encrypt = rand_block(); input_decrypt = rand_block();
      step();
    end

    // Self-test run.
    ctrl = 1;
    for (int i = 0; i < 300; i++) step();

    // Back to mission mode: LFSR and MISRs must hold.
    ctrl = 0;
    for (int i = 0; i < 10; i++) begin
      input_key = rand_block(); input_encrypt = rand_block(); input_decrypt = rand_block();
      step();
    end

    // Self-test again with injected faults.
    ctrl = 1;
    for (int i = 0; i < 40; i++) begin
      fault_inject = (i == 5) ? 2'b01 : (i == 12) ? 2'b10 : (i == 20) ? 2'b11 : 2'b00;
      step();
    end
    fault_inject = '0;
    step();

    need(n_selftest, "self-test cycles");
    need(n_mission, "mission cycles");
    need(n_switch, "mode switches");
    need(n_misr, "MISR compaction steps");
    need(n_faulten, "encryption fault flagged");
    need(n_faultde, "decryption fault flagged");
    $display("final signatures: sig_en=%h sig_de=%h", sig_en, sig_de);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
