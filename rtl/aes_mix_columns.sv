// aes_mix_columns: the AES MixColumns step, built for small area and short depth.
//
// Each column (a0..a3) is multiplied by the circulant matrix (02 03 01 01) over GF(2^8).
// Instead of forming 02*ai and 03*ai for every byte, the column sum t = a0^a1^a2^a3 is
// shared and each output needs only one doubling:
//     b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1))          (indices mod 4)
// since 02*a_i ^ 03*a_(i+1) ^ a_(i+2) ^ a_(i+3) = a_i ^ t ^ 02*(a_i ^ a_(i+1)).
// Per column: 4 byte XORs for t (shared), 4 for the pair sums, 4 xtime (one XOR layer of
// 3 bits each), 8 for the outputs; depth is 3 XOR levels plus the xtime reduction.
// The reduced-XOR form is this design's own choice: the original description names a mix-column
// architecture optimised for area and speed without giving its equations.
// Combinational. Interface: din/dout are 128-bit states packed as in FIPS-197.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      byte_t t;
      for (int r = 0; r < 4; r++) a[r] = din[127 - 8*(4*c + r) -: 8];
      t = a[0] ^ a[1] ^ a[2] ^ a[3];
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(4*c + r) -: 8] = a[r] ^ t ^ xtime(a[r] ^ a[(r + 1) % 4]);
    end
  end
endmodule
