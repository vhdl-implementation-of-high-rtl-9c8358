// aes_ref_pkg: an independent software model of AES-128 for the testbenches.
//
// It shares no code with the RTL. GF(2^8) products are computed bit by bit
// with reduction by 9'h11b, the multiplicative inverse is found by search,
// the state is kept as a 4x4 byte matrix indexed [row][column], and the key
// schedule is written word by word as in FIPS-197. Byte k of a 128-bit
// vector is bits [127-8k -: 8] and sits at row k%4, column k/4.
package aes_ref_pkg;

  typedef logic [7:0] mat_t [4][4];

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 8'h00;
    logic [7:0] s;
    for (int c = 1; c < 256; c++) if (ref_mul(x, 8'(c)) == 8'h01) inv = 8'(c);
    // affine map, bit form: s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  function automatic logic [7:0] ref_inv_sbox(logic [7:0] y);
    for (int c = 0; c < 256; c++) if (ref_sbox(8'(c)) == y) return 8'(c);
    return 8'h00;
  endfunction

  function automatic mat_t to_mat(logic [127:0] v);
    mat_t m;
    for (int k = 0; k < 16; k++) m[k%4][k/4] = v[127-8*k -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] v;
    for (int k = 0; k < 16; k++) v[127-8*k -: 8] = m[k%4][k/4];
    return v;
  endfunction

  // Fast tables built once by the user of the package via ref_init().
  logic [7:0] SB [256];
  logic [7:0] ISB [256];
  function automatic void ref_init();
    for (int i = 0; i < 256; i++) SB[i] = ref_sbox(8'(i));
    for (int i = 0; i < 256; i++) ISB[SB[i]] = 8'(i);
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] v, bit inv);
    mat_t m = to_mat(v);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = inv ? ISB[m[r][c]] : SB[m[r][c]];
    return from_mat(m);
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] v, bit inv);
    mat_t m = to_mat(v), o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      if (inv) o[r][(c + r) % 4] = m[r][c];
      else     o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] v, bit inv);
    mat_t m = to_mat(v), o;
    logic [7:0] k [4];
    if (inv) k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     k = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
      o[r][c] = 8'h00;
      for (int j = 0; j < 4; j++) o[r][c] ^= ref_mul(k[(j - r + 4) % 4], m[j][c]);
    end
    return from_mat(o);
  endfunction

  function automatic logic [31:0] ref_subword(logic [31:0] w);
    return {SB[w[31:24]], SB[w[23:16]], SB[w[15:8]], SB[w[7:0]]};
  endfunction

  // Round key r (0..10) of a 128-bit key.
  function automatic logic [127:0] ref_round_key(logic [127:0] key, int r);
    logic [31:0] w [44];
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = ref_subword({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s = pt ^ ref_round_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != 10) s = ref_mix_columns(s, 0);
      s ^= ref_round_key(key, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] ct, logic [127:0] key);
    logic [127:0] s = ct ^ ref_round_key(key, 10);
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1);
      s ^= ref_round_key(key, r);
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
