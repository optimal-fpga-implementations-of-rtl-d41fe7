// rsm_pkg: types, constants and functions shared by the Rotating S-box Masking
// (RSM) AES-128 design.
//
// Byte order: a 128-bit block holds 16 bytes, byte 0 in bits [127:120] and
// byte 15 in bits [7:0]; byte i sits in row i%4 and column i/4 of the AES
// state, as in FIPS-197.
//
// Masks: the base mask set is 16 bytes m_0..m_15 (byte k of BASE_MASKS).
// M_j is the base set rotated by j bytes: byte i of M_j is m_((i+j) mod 16).
// The masked S-box number k is S'_k(x) = S(x ^ m_k) ^ m_(k+1), so a state
// masked with M_j comes out of the S-box layer masked with M_(j+1). This is
// the construction of the RSM countermeasure. The remasking constants are
// MMS_j = MC(SR(M_j)) ^ M_j and MS_j = SR(M_j).
//
// The AES S-box is computed (inverse in GF(2^8) modulo x^8+x^4+x^3+x+1,
// then the FIPS-197 affine map) rather than listed. The default base mask
// set is this design's own choice: the 16 codewords of a linear binary code
// of length 8 and minimum distance 4. It is closed under XOR and every bit is
// 1 in exactly half of the masks, so with a uniform offset each state bit is
// covered by a balanced mask bit, which first-order protection needs. Any 16
// distinct bytes give a correct cipher.
package rsm_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  // S-box layer architecture of the AES core.
  typedef enum logic [1:0] {
    ARCH_SOL1 = 2'd1,  // barrel shifters + two-half dual-port S-boxes (refreshable)
    ARCH_SOL2 = 2'd2   // 16 rotated 4096x8 S-box memories, no barrel shifters
  } arch_e;

  // The three mask sets of the mask pool.
  typedef enum logic [1:0] {
    SET_M   = 2'd0,  // M_j
    SET_MMS = 2'd1,  // MMS_j = MC(SR(M_j)) ^ M_j
    SET_MS  = 2'd2   // MS_j  = SR(M_j)
  } mask_set_e;

  // Default base mask set m_0..m_15 (m_0 in the top byte).
  localparam block_t DEFAULT_MASKS = 128'h00_0f_36_39_53_5c_65_6a_95_9a_a3_ac_c6_c9_f0_ff;

  localparam int NB = 16;  // bytes per block, also the number of masks

  function automatic byte_t get_byte(block_t b, int i);
    return b[127-8*i -: 8];
  endfunction

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t ginv(byte_t a);
    byte_t r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);  // 254 = 0b11111110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox(byte_t a);
    byte_t b, s;
    b = ginv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127-8*(4*c+row) -: 8] = get_byte(s, 4*((c+row)%4) + row);
    return r;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2);
      a3 = get_byte(s, 4*c+3);
      r[127-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // M_j: base masks rotated by j bytes.
  function automatic block_t mask_rot(block_t base, int j);
    block_t r;
    for (int i = 0; i < NB; i++)
      r[127-8*i -: 8] = get_byte(base, (i + j) % NB);
    return r;
  endfunction

  function automatic block_t mask_mms(block_t base, int j);
    return mix_columns(shift_rows(mask_rot(base, j))) ^ mask_rot(base, j);
  endfunction

  function automatic block_t mask_ms(block_t base, int j);
    return shift_rows(mask_rot(base, j));
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t gen_sbox_table();
    sbox_table_t t;
    for (int a = 0; a < 256; a++) t[a] = sbox(byte_t'(a));
    return t;
  endfunction

  // The AES S-box as a table, evaluated at elaboration.
  localparam sbox_table_t SBOX = gen_sbox_table();

  // Masked S-box S'_k(x) = S(x ^ m_k) ^ m_(k+1).
  function automatic byte_t masked_sbox(block_t base, int k, byte_t x);
    return SBOX[x ^ get_byte(base, k % NB)] ^ get_byte(base, (k + 1) % NB);
  endfunction

endpackage
