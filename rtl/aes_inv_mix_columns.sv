// aes_inv_mix_columns: the InvMixColumns transformation.
//
// Each column (a0..a3) is multiplied modulo x^4 + 1 by
// d(x) = {0B}x^3 + {0D}x^2 + {09}x + {0E}, the inverse of the MixColumns
// polynomial:
//   b_r = {0E}a_r ^ {0B}a_(r+1) ^ {0D}a_(r+2) ^ {09}a_(r+3)   (indices mod 4)
// The constant multiplications are built from repeated xtime:
// 9a = 8a^a, 11a = 8a^2a^a, 13a = 8a^4a^a, 14a = 8a^4a^2a.
//
// Interface: state_in -> state_out, 128 bits each. Combinational.
module aes_inv_mix_columns
  import aes_pkg::state_t, aes_pkg::byte_t, aes_pkg::xtime;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    byte_t m9 [4], m11 [4], m13 [4], m14 [4];
    for (genvar r = 0; r < 4; r++) begin : g_byte
      byte_t x2, x4, x8;
      assign a[r]   = state_in[127 - 8*(4*c + r) -: 8];
      assign x2     = xtime(a[r]);
      assign x4     = xtime(x2);
      assign x8     = xtime(x4);
      assign m9[r]  = x8 ^ a[r];
      assign m11[r] = x8 ^ x2 ^ a[r];
      assign m13[r] = x8 ^ x4 ^ a[r];
      assign m14[r] = x8 ^ x4 ^ x2;
    end
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign state_out[127 - 8*(4*c + r) -: 8] =
          m14[r] ^ m11[(r + 1) % 4] ^ m13[(r + 2) % 4] ^ m9[(r + 3) % 4];
    end
  end

endmodule
