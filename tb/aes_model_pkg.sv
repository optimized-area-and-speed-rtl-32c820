// aes_model_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-box is built by searching for each byte's
// multiplicative inverse with a general GF(2^8) multiplier and applying the affine map bit
// by bit (b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i); MixColumns multiplies
// by the matrix entries directly; ShiftRows indexes the 4x4 array. It also models the
// 128-bit LFSR and MISR recurrences used by the self-test logic.
package aes_model_pkg;

  typedef logic [7:0]   m_byte_t;
  typedef logic [127:0] m_block_t;
  typedef m_byte_t      m_state_t [4][4];   // [row][col]

  function automatic m_byte_t m_mul(input m_byte_t a, input m_byte_t b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic m_byte_t m_sbox(input m_byte_t a);
    m_byte_t inv = 8'h00;
    m_byte_t c = 8'h63;
    m_byte_t r;
    if (a != 0)
      for (int x = 1; x < 256; x++) if (m_mul(a, m_byte_t'(x)) == 8'h01) inv = m_byte_t'(x);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
    return r;
  endfunction

  typedef m_byte_t m_tab_t [256];

  function automatic m_tab_t gen_sbox_tab();
    m_tab_t t;
    for (int i = 0; i < 256; i++) t[i] = m_sbox(m_byte_t'(i));
    return t;
  endfunction

  function automatic m_tab_t invert_tab(input m_tab_t f);
    m_tab_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = m_byte_t'(i);
    return t;
  endfunction

  // Built once at time zero.
  m_tab_t sb_tab  = gen_sbox_tab();
  m_tab_t isb_tab = invert_tab(sb_tab);

  function automatic m_byte_t sbox(input m_byte_t a);     return sb_tab[a];  endfunction
  function automatic m_byte_t inv_sbox(input m_byte_t a); return isb_tab[a]; endfunction

  function automatic void to_state(input m_block_t b, output m_state_t s);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c+r) -: 8];
  endfunction
  function automatic m_block_t from_state(input m_state_t s);
    m_block_t b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127 - 8*(4*c+r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic m_block_t sub_bytes(input m_block_t b, input bit inverse = 0);
    m_block_t o;
    for (int k = 0; k < 16; k++) o[8*k +: 8] = inverse ? inv_sbox(b[8*k +: 8]) : sbox(b[8*k +: 8]);
    return o;
  endfunction

  function automatic m_block_t shift_rows(input m_block_t b, input bit inverse = 0);
    m_state_t s, o;
    to_state(b, s);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      if (!inverse) o[r][c] = s[r][(c+r)%4]; else o[r][(c+r)%4] = s[r][c];
    return from_state(o);
  endfunction

  function automatic m_block_t mix_columns(input m_block_t b, input bit inverse = 0);
    m_byte_t fw [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    m_byte_t iv [4] = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    m_state_t s, o;
    to_state(b, s);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
      o[r][c] = 0;
      for (int k = 0; k < 4; k++)
        o[r][c] ^= m_mul(inverse ? iv[(k - r + 4)%4] : fw[(k - r + 4)%4], s[k][c]);
    end
    return from_state(o);
  endfunction

  typedef m_block_t m_keys_t [11];

  function automatic void key_expand(input m_block_t key, output m_keys_t rk);
    logic [31:0] w [44];
    logic [31:0] t;
    m_byte_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = m_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int j = 0; j < 11; j++) rk[j] = {w[4*j], w[4*j+1], w[4*j+2], w[4*j+3]};
  endfunction

  function automatic logic [1407:0] pack_keys(input m_keys_t rk);
    logic [1407:0] p;
    for (int j = 0; j < 11; j++) p[1407 - 128*j -: 128] = rk[j];
    return p;
  endfunction

  function automatic m_block_t encrypt(input m_block_t pt, input m_block_t key);
    m_keys_t rk;
    m_block_t s;
    key_expand(key, rk);
    s = pt ^ rk[0];
    for (int j = 1; j <= 10; j++) begin
      s = shift_rows(sub_bytes(s));
      if (j < 10) s = mix_columns(s);
      s ^= rk[j];
    end
    return s;
  endfunction

  function automatic m_block_t decrypt(input m_block_t ct, input m_block_t key);
    m_keys_t rk;
    m_block_t s;
    key_expand(key, rk);
    s = ct ^ rk[10];
    for (int j = 9; j >= 0; j--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ rk[j];
      if (j > 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  // One step of the 128-bit LFSR / MISR recurrence (taps 128, 126, 101, 99).
  function automatic m_block_t lfsr_step(input m_block_t s);
    return {s[126:0], s[127] ^ s[125] ^ s[100] ^ s[98]};
  endfunction
  function automatic m_block_t misr_step(input m_block_t s, input m_block_t d);
    return lfsr_step(s) ^ d;
  endfunction

  function automatic m_block_t rand_block();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
