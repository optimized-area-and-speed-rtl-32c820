// aes_decrypt: unrolled AES-128 inverse cipher, combinational.
//
// Structure (the inverse cipher of FIPS-197, unrolled):
//   AddRoundKey(w[40..43]); then for j = NR-1 down to 1: InvShiftRows, InvSubBytes,
//   AddRoundKey(w[4j..4j+3]), InvMixColumns; last: InvShiftRows, InvSubBytes,
//   AddRoundKey(w[0..3]).
// Round keys are used in reverse order from the shared expanded key. No registers.
// Interface: ciphertext/plaintext packed as in FIPS-197; round key j in
// round_keys[128*(NR+1)-1-128j -: 128].
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = 10
) (
  input  block_t                   ciphertext,
  input  logic [128*(NR_P+1)-1:0] round_keys,
  output block_t                   plaintext
);
  function automatic block_t rk(input logic [128*(NR_P+1)-1:0] keys, input int unsigned j);
    return keys[128*(NR_P+1) - 1 - 128*j -: 128];
  endfunction

  // st[j] is the state right after AddRoundKey with round key j.
  block_t st  [NR_P+1];
  block_t isr [0:NR_P-1];
  block_t isb [0:NR_P-1];
  block_t ak  [0:NR_P-1];

  aes_add_round_key u_ark_first (.din(ciphertext), .round_key(rk(round_keys, NR_P)),
                                 .dout(st[NR_P]));

  for (genvar j = NR_P - 1; j >= 0; j--) begin : g_round
    aes_inv_shift_rows u_isr (.din(st[j+1]), .dout(isr[j]));
    aes_inv_sub_bytes  u_isb (.din(isr[j]),  .dout(isb[j]));
    aes_add_round_key  u_ark (.din(isb[j]),  .round_key(rk(round_keys, j)), .dout(ak[j]));
    if (j > 0) begin : g_mix
      aes_inv_mix_columns u_imc (.din(ak[j]), .dout(st[j]));
    end else begin : g_last
      assign st[j] = ak[j];  // last inverse round has no InvMixColumns
    end
  end

  assign plaintext = st[0];
endmodule
