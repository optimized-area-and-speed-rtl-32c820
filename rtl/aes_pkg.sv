// aes_pkg: shared types, constants and GF(2^8) arithmetic for the AES-128 datapath.
//
// The 128-bit block is packed as in FIPS-197: byte 0 of the input sits in bits [127:120]
// and byte k is state row k%4, column k/4. The S-box and its inverse are not typed in as
// tables: they are computed at elaboration from their definition (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1, then the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3)
// ^ rotl(b,4) ^ 0x63), so a synthesiser turns each lookup into a 256-entry constant ROM.
// Multiplication by constants in MixColumns and its inverse is done with xtime chains.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  localparam int unsigned NR  = 10;  // rounds for AES-128 (11 round keys, 44 words)

  // Multiply by x (02) in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  typedef byte_t sbox_table_t [256];

  // Affine map of the S-box applied to an already inverted byte.
  function automatic byte_t sbox_affine(input byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // Forward S-box. Inverses come from powers of the generator 03: if a = 03^e then
  // a^-1 = 03^(255-e). One walk over the 255 powers gives all of them.
  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    byte_t pw [255];
    byte_t p = 8'h01;
    for (int e = 0; e < 255; e++) begin
      pw[e] = p;
      p = p ^ xtime(p);  // multiply by 03
    end
    t[0] = sbox_affine(8'h00);
    for (int e = 0; e < 255; e++) t[pw[e]] = sbox_affine(pw[(255 - e) % 255]);
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t f = gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_table_t SBOX     = gen_sbox();
  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

endpackage
