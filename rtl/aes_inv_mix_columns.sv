// aes_inv_mix_columns: the AES InvMixColumns step of the inverse cipher.
//
// The inverse matrix (0e 0b 0d 09) factors as the forward matrix (02 03 01 01) times the
// matrix (05 00 04 00), circulant. So each column is first pre-conditioned with
//     u = 04*(a0 ^ a2),  v = 04*(a1 ^ a3),  a0^=u, a1^=v, a2^=u, a3^=v
// (two doublings each) and then passed through the same shared-XOR MixColumns network as
// the forward direction (aes_mix_columns). This keeps the inverse almost as small as the
// forward step. The factorisation is this design's choice; the original description only names the step.
// Combinational. Interface: din/dout are 128-bit states packed as in FIPS-197.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  block_t pre;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      byte_t u, v;
      for (int r = 0; r < 4; r++) a[r] = din[127 - 8*(4*c + r) -: 8];
      u = xtime(xtime(a[0] ^ a[2]));
      v = xtime(xtime(a[1] ^ a[3]));
      pre[127 - 8*(4*c + 0) -: 8] = a[0] ^ u;
      pre[127 - 8*(4*c + 1) -: 8] = a[1] ^ v;
      pre[127 - 8*(4*c + 2) -: 8] = a[2] ^ u;
      pre[127 - 8*(4*c + 3) -: 8] = a[3] ^ v;
    end
  end

  aes_mix_columns u_mix (.din(pre), .dout(dout));
endmodule
