// aes_shift_rows: the AES ShiftRows step.
//
// Row r of the 4x4 byte state is rotated left by r positions: output byte (r, c) takes
// input byte (r, (c + r) mod 4). Pure wiring, no gates. Combinational.
// Interface: din/dout are 128-bit states, byte k = row k%4, column k/4, byte 0 in [127:120].
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(4*c + r) -: 8] = din[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end
endmodule
