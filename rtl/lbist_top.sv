// lbist_top: AES-128 crypto device with logic built-in self-test.
//
// Three parts, as in the self-test architecture:
//   * test pattern generator: a 128-bit maximal-length LFSR (lfsr);
//   * circuit under test: an AES-128 core with encryption, decryption and key expansion
//     (u_cut, the "practical" circuit), next to an identical reference core (u_ref, the
//     "theoretical" circuit);
//   * output response analyser: 128 XOR gates per direction comparing practical with
//     theoretical results (ora_compare -> faulten, faultde), and a multiple-input signature
//     register per direction compacting the CUT responses (misr -> sig_en, sig_de).
//
// Modes (ctrl):
//   ctrl = 1  self-test. The LFSR advances every cycle and its state is applied as the
//             plaintext, the ciphertext and the key of both cores; MISRs compact.
//   ctrl = 0  mission mode. input_encrypt, input_decrypt and input_key drive both cores;
//             the LFSR and the MISRs hold.
// Timing: the cores are combinational between the pattern/input selection and the output
// registers, so one block per direction is encrypted and decrypted every clock cycle with
// one cycle of latency: inputs present before edge n appear on out1/out2 after edge n.
// faulten/faultde are combinational from those registers and are valid while valid = 1.
// The MISRs take the registered responses, so a signature includes a response one edge
// after it appears on out1/out2. Reset is synchronous, active low (rst_n).
// fault_inject[0] flips bit 0 of the CUT ciphertext and fault_inject[1] bit 0 of the CUT
// plaintext before the output registers; it emulates a defect so the analyser can be
// exercised. The duplicated reference core, the shared LFSR word for data and key, the
// register placement and the fault-inject hook are this design's reading of the block
// diagram and the simulation signal names (int1_en, int3_key, out1, out1_f, faulten, ...).
module lbist_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctrl,
  input  logic [1:0] fault_inject,
  input  block_t     input_encrypt,
  input  block_t     input_decrypt,
  input  block_t     input_key,
  output block_t     out1,
  output block_t     out2,
  output block_t     out1_f,
  output block_t     out2_f,
  output logic       faulten,
  output logic       faultde,
  output logic       valid,
  output block_t     sig_en,
  output block_t     sig_de,
  output block_t     pattern
);
  // ---------------- test pattern generator ----------------
  lfsr #(.WIDTH(128)) u_tpg (.clk(clk), .rst_n(rst_n), .en(ctrl), .state(pattern));

  // Stimulus selection: int1_en / int2_de / int3_key.
  block_t int1_en, int2_de, int3_key;
  assign int1_en  = ctrl ? pattern : input_encrypt;
  assign int2_de  = ctrl ? pattern : input_decrypt;
  assign int3_key = ctrl ? pattern : input_key;

  // ---------------- circuit under test and reference ----------------
  block_t enc_cut, dec_cut, enc_ref, dec_ref;
  logic [128*(NR+1)-1:0] keys_cut, keys_ref;

  aes128_core u_cut (
    .input_encrypt(int1_en), .input_decrypt(int2_de), .input_key(int3_key),
    .out_keys(keys_cut), .output_encrypt(enc_cut), .output_decrypt(dec_cut));

  aes128_core u_ref (
    .input_encrypt(int1_en), .input_decrypt(int2_de), .input_key(int3_key),
    .out_keys(keys_ref), .output_encrypt(enc_ref), .output_decrypt(dec_ref));

  // Output registers.
  logic test_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out1   <= '0;
      out2   <= '0;
      out1_f <= '0;
      out2_f <= '0;
      valid  <= 1'b0;
      test_q <= 1'b0;
    end else begin
      out1   <= enc_cut ^ {127'b0, fault_inject[0]};
      out2   <= dec_cut ^ {127'b0, fault_inject[1]};
      out1_f <= enc_ref;
      out2_f <= dec_ref;
      valid  <= 1'b1;
      test_q <= ctrl;
    end
  end

  // ---------------- output response analyser ----------------
  logic   fault_en_raw, fault_de_raw;

  ora_compare #(.WIDTH(128)) u_ora_en (.practical(out1), .theoretical(out1_f),
                                       .diff(), .fault(fault_en_raw));
  ora_compare #(.WIDTH(128)) u_ora_de (.practical(out2), .theoretical(out2_f),
                                       .diff(), .fault(fault_de_raw));

  assign faulten = valid & fault_en_raw;
  assign faultde = valid & fault_de_raw;

  misr #(.WIDTH(128)) u_misr_en (.clk(clk), .rst_n(rst_n), .en(valid & test_q),
                                 .din(out1), .signature(sig_en));
  misr #(.WIDTH(128)) u_misr_de (.clk(clk), .rst_n(rst_n), .en(valid & test_q),
                                 .din(out2), .signature(sig_de));

  // The two key schedules are identical circuits fed the same key.
  property p_keys_agree;
    @(posedge clk) disable iff (!rst_n) keys_cut == keys_ref;
  endproperty
  a_keys_agree: assert property (p_keys_agree);
endmodule
