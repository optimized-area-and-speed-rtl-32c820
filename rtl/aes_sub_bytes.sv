// aes_sub_bytes: the AES SubBytes step (the "S-BOX" block of the cipher).
//
// Each of the 16 state bytes is replaced by S(b), the inverse in GF(2^8) followed by the
// AES affine map. The table is the constant aes_pkg::SBOX, computed from that definition
// at elaboration; each byte lane is one 256x8 ROM lookup. Purely combinational.
// Interface: din/dout are 128-bit states packed as in FIPS-197.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  always_comb begin
    for (int k = 0; k < 16; k++) dout[127 - 8*k -: 8] = SBOX[din[127 - 8*k -: 8]];
  end
endmodule
