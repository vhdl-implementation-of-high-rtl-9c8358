// aes_sbox: the AES S-box as a 256 x 8-bit lookup table.
//
// SubBytes is done by table lookup rather than by computing the GF(2^8)
// inverse in logic, so one substitution costs one table read and fits in a
// single clock cycle together with the rest of a round. The table contents
// are computed at elaboration by aes_pkg::gen_sbox() (multiplicative inverse
// followed by the affine transform) and then indexed like a ROM.
//
// Interface: din (8 bits) in, dout = S(din) out. Purely combinational.
module aes_sbox
  import aes_pkg::byte_t, aes_pkg::sbox_table_t, aes_pkg::gen_sbox;
(
  input  byte_t din,
  output byte_t dout
);

  localparam sbox_table_t SBOX = gen_sbox();

  assign dout = SBOX[din];

endmodule
