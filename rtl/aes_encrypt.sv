// aes_encrypt: unrolled AES-128 cipher, combinational from plaintext to ciphertext.
//
// Structure (one instance of each step per round, as in the unrolled encryption chain):
//   AddRoundKey(w[0..3]); rounds 1..NR-1: SubBytes, ShiftRows, MixColumns,
//   AddRoundKey(w[4j..4j+3]); final round NR: SubBytes, ShiftRows, AddRoundKey(w[40..43]).
// The expanded key comes from outside (aes_key_expansion), so encryption and decryption
// can share one key schedule. There are no registers; the caller registers the result.
// Interface: plaintext/ciphertext packed as in FIPS-197; round key j in
// round_keys[128*(NR+1)-1-128j -: 128].
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = 10
) (
  input  block_t                   plaintext,
  input  logic [128*(NR_P+1)-1:0] round_keys,
  output block_t                   ciphertext
);
  function automatic block_t rk(input logic [128*(NR_P+1)-1:0] keys, input int unsigned j);
    return keys[128*(NR_P+1) - 1 - 128*j -: 128];
  endfunction

  block_t st  [NR_P+1];   // state after AddRoundKey of round j
  block_t sb  [1:NR_P];
  block_t sr  [1:NR_P];
  block_t mc  [1:NR_P];

  aes_add_round_key u_ark0 (.din(plaintext), .round_key(rk(round_keys, 0)), .dout(st[0]));

  for (genvar j = 1; j <= NR_P; j++) begin : g_round
    aes_sub_bytes  u_sb (.din(st[j-1]), .dout(sb[j]));
    aes_shift_rows u_sr (.din(sb[j]),   .dout(sr[j]));
    if (j < NR_P) begin : g_mix
      aes_mix_columns u_mc (.din(sr[j]), .dout(mc[j]));
    end else begin : g_last
      assign mc[j] = sr[j];  // final round has no MixColumns
    end
    aes_add_round_key u_ark (.din(mc[j]), .round_key(rk(round_keys, j)), .dout(st[j]));
  end

  assign ciphertext = st[NR_P];
endmodule
