// aes_inv_shift_rows: the AES InvShiftRows step of the inverse cipher.
//
// Row r of the state is rotated right by r positions: output byte (r, (c + r) mod 4) takes
// input byte (r, c). Pure wiring. Combinational.
// Interface: din/dout are 128-bit states packed as in FIPS-197.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(4*((c + r) % 4) + r) -: 8] = din[127 - 8*(4*c + r) -: 8];
  end
endmodule
