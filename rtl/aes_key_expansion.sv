// aes_key_expansion: the AES-128 key schedule ("Expand key"), fully combinational.
//
// The 128-bit cipher key gives words w[0..3]; each later word is
//     w[i] = w[i-4] ^ (i % 4 == 0 ? SubWord(RotWord(w[i-1])) ^ Rcon[i/4] : w[i-1])
// with Rcon[j] = {02^(j-1), 00, 00, 00}. The round constants are generated by doubling
// rather than stored. All 44 words (11 round keys) are produced at once, so round j of
// an unrolled cipher reads its key w[4j..4j+3] directly.
// Interface: key is the cipher key (first word in [127:96]); round_keys holds round key j
// in bits [1407-128j -: 128]. NR is fixed at 10 for AES-128.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = 10
) (
  input  block_t                   key,
  output logic [128*(NR_P+1)-1:0] round_keys
);
  localparam int unsigned NWORDS = 4 * (NR_P + 1);

  logic [31:0] w [NWORDS];

  always_comb begin
    byte_t rcon;
    logic [31:0] tmp;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < NWORDS; i++) begin
      tmp = w[i-1];
      if (i % 4 == 0) begin
        tmp = {tmp[23:0], tmp[31:24]};                          // RotWord
        tmp = {SBOX[tmp[31:24]], SBOX[tmp[23:16]], SBOX[tmp[15:8]], SBOX[tmp[7:0]]};
        tmp[31:24] = tmp[31:24] ^ rcon;
        rcon = xtime(rcon);
      end
      w[i] = w[i-4] ^ tmp;
    end
    for (int i = 0; i < NWORDS; i++) round_keys[128*(NR_P+1) - 1 - 32*i -: 32] = w[i];
  end
endmodule
