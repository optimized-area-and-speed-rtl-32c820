// aes_add_round_key: the AES AddRoundKey step, a 128-bit XOR of the state with the
// round key. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t din,
  input  block_t round_key,
  output block_t dout
);
  assign dout = din ^ round_key;
endmodule
