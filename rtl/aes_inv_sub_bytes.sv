// aes_inv_sub_bytes: the AES InvSubBytes step of the inverse cipher.
//
// Each of the 16 state bytes is replaced through the inverse S-box, the constant
// aes_pkg::INV_SBOX obtained by inverting the computed forward table. Combinational.
// Interface: din/dout are 128-bit states packed as in FIPS-197.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  always_comb begin
    for (int k = 0; k < 16; k++) dout[127 - 8*k -: 8] = INV_SBOX[din[127 - 8*k -: 8]];
  end
endmodule
