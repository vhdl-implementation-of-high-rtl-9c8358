// aes_pkg: types, constants and GF(2^8) helper functions shared by the AES-128
// encryptor/decryptor.
//
// The block and key are 128 bits (Nb = Nk = 4 words) and the cipher runs
// Nr = 10 rounds, the AES-128 row of the key/block/round table of the
// standard. The state is a 128-bit vector whose byte 0 is bits [127:120];
// byte i lies in row i%4 and column i/4, the column-major order of FIPS-197.
//
// The S-box and inverse S-box tables are filled at elaboration time by
// gen_sbox()/gen_inv_sbox(): S(x) = affine(x^-1), with the inverse found as
// x^254 in GF(2^8) modulo x^8+x^4+x^3+x+1 and the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63. The tables are
// then plain 256-entry lookup ROMs; computing rather than listing them is a
// choice of this design.
package aes_pkg;

  localparam int unsigned NR = 10;  // number of rounds for a 128-bit key

  typedef logic [127:0] state_t;
  typedef logic [7:0]   byte_t;
  typedef logic [255:0][7:0] sbox_table_t;

  // Byte i (0..15) of a state, byte 0 in the most significant position.
  function automatic byte_t get_byte(state_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  // Multiply by x (i.e. {02}) in GF(2^8).
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication by shift and add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // S-box entry: multiplicative inverse (0 maps to 0) then affine transform.
  function automatic byte_t sbox_entry(byte_t x);
    byte_t inv = 8'h01;
    byte_t sq  = x;
    // x^254 = x^(2+4+8+16+32+64+128)
    for (int k = 1; k < 8; k++) begin
      sq  = gf_mul(sq, sq);
      inv = gf_mul(inv, sq);
    end
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_entry(byte_t'(i));
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[sbox_entry(byte_t'(i))] = byte_t'(i);
    return t;
  endfunction

endpackage
