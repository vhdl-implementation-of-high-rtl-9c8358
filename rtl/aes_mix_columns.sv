// aes_mix_columns: the MixColumns transformation.
//
// Each column (a0..a3, a0 in row 0) is taken as a polynomial over GF(2^8) and
// multiplied modulo x^4 + 1 by c(x) = {03}x^3 + {01}x^2 + {01}x + {02}, i.e.
//   b0 = 2a0 ^ 3a1 ^  a2 ^  a3      b1 =  a0 ^ 2a1 ^ 3a2 ^  a3
//   b2 =  a0 ^  a1 ^ 2a2 ^ 3a3      b3 = 3a0 ^  a1 ^  a2 ^ 2a3
// Multiplication by {02} is xtime (shift and conditional XOR of 8'h1b),
// by {03} is xtime(a) ^ a.
//
// Interface: state_in -> state_out, 128 bits each. Combinational.
module aes_mix_columns
  import aes_pkg::state_t, aes_pkg::byte_t, aes_pkg::xtime;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    byte_t x2 [4];
    for (genvar r = 0; r < 4; r++) begin : g_byte
      assign a[r]  = state_in[127 - 8*(4*c + r) -: 8];
      assign x2[r] = xtime(a[r]);
    end
    for (genvar r = 0; r < 4; r++) begin : g_out
      // 2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3]
      assign state_out[127 - 8*(4*c + r) -: 8] =
          x2[r] ^ x2[(r + 1) % 4] ^ a[(r + 1) % 4] ^ a[(r + 2) % 4] ^ a[(r + 3) % 4];
    end
  end

endmodule
