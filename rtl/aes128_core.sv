// aes128_core: AES-128 encryption and decryption datapaths sharing one key schedule.
//
// This is the circuit under test of the self-test scheme. input_key is expanded once by
// aes_key_expansion; the 11 round keys feed the unrolled cipher (input_encrypt to
// output_encrypt) and the unrolled inverse cipher (input_decrypt to output_decrypt) at the
// same time. All of it is combinational: the surrounding design registers the outputs, so
// one block in each direction is processed per clock cycle. out_keys exposes the expanded
// key (round key j in bits [1407-128j -: 128]). Port names follow the AES instance of the
// original simulation; sharing the key schedule between both directions is this design's
// choice.
module aes128_core
  import aes_pkg::*;
(
  input  block_t                 input_encrypt,
  input  block_t                 input_decrypt,
  input  block_t                 input_key,
  output logic [128*(NR+1)-1:0] out_keys,
  output block_t                 output_encrypt,
  output block_t                 output_decrypt
);
  aes_key_expansion #(.NR_P(NR)) u_keys (.key(input_key), .round_keys(out_keys));

  aes_encrypt #(.NR_P(NR)) u_enc (.plaintext(input_encrypt), .round_keys(out_keys),
                                  .ciphertext(output_encrypt));

  aes_decrypt #(.NR_P(NR)) u_dec (.ciphertext(input_decrypt), .round_keys(out_keys),
                                  .plaintext(output_decrypt));
endmodule
