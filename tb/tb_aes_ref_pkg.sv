// tb_aes_ref_pkg: reference model for the RSM testbenches.
//
// A plain AES-128 written independently of the design: the S-box is found
// by searching for the multiplicative inverse and applying the affine map
// bit by bit; the state is kept as a 4x4 byte array. Mask helpers rebuild
// M_j, MMS_j and MS_j from their definitions on that array.
package tb_aes_ref_pkg;

  typedef logic [7:0] st_t [4][4];  // [row][col]

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  logic [7:0] sbox_cache [256];
  bit         sbox_cached [256];

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    if (!sbox_cached[a]) begin
      sbox_cache[a]  = ref_sbox_calc(a);
      sbox_cached[a] = 1'b1;
    end
    return sbox_cache[a];
  endfunction

  function automatic logic [7:0] ref_sbox_calc(logic [7:0] a);
    logic [7:0] inv, s;
    inv = 8'h00;
    for (int b = 1; b < 256; b++) if (mul(a, 8'(b)) == 8'h01) inv = 8'(b);
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic logic [127:0] ref_sr(logic [127:0] b);
    st_t s, t;
    s = to_st(b);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = s[r][(c + r) % 4];
    return from_st(t);
  endfunction

  function automatic logic [127:0] ref_sr_inv(logic [127:0] b);
    st_t s, t;
    s = to_st(b);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = s[r][c];
    return from_st(t);
  endfunction

  function automatic logic [127:0] ref_mc(logic [127:0] b);
    st_t s, t;
    logic [7:0] m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    s = to_st(b);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) t[r][c] ^= mul(m[r][k], s[k][c]);
      end
    return from_st(t);
  endfunction

  function automatic logic [127:0] ref_sb(logic [127:0] b);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = ref_sbox(b[127 - 8*i -: 8]);
    return r;
  endfunction

  // round keys 0..10
  typedef logic [127:0] rks_t [11];
  function automatic rks_t ref_expand(logic [127:0] key);
    rks_t rk;
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0] rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0]), ref_sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    rks_t rk;
    logic [127:0] s;
    rk = ref_expand(key);
    s = pt ^ rk[0];
    for (int r = 1; r < 10; r++) s = ref_mc(ref_sr(ref_sb(s))) ^ rk[r];
    return ref_sr(ref_sb(s)) ^ rk[10];
  endfunction

  // mask m_k of a base set (m_0 in the top byte)
  function automatic logic [7:0] mk(logic [127:0] base, int k);
    return base[127 - 8*(k % 16) -: 8];
  endfunction

  function automatic logic [127:0] ref_m(logic [127:0] base, int j);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = mk(base, i + j);
    return r;
  endfunction

  function automatic logic [127:0] ref_mms(logic [127:0] base, int j);
    return ref_mc(ref_sr(ref_m(base, j))) ^ ref_m(base, j);
  endfunction

  function automatic logic [127:0] ref_ms(logic [127:0] base, int j);
    return ref_sr(ref_m(base, j));
  endfunction

  function automatic logic [7:0] ref_masked_sbox(logic [127:0] base, int k, logic [7:0] x);
    return ref_sbox(x ^ mk(base, k)) ^ mk(base, k + 1);
  endfunction

  localparam logic [127:0] TB_MASKS = 128'h00_0f_36_39_53_5c_65_6a_95_9a_a3_ac_c6_c9_f0_ff;

endpackage
