// aes_inv_sbox: the AES inverse S-box as a 256 x 8-bit lookup table.
//
// Used by InvSubBytes. The table is the inverse permutation of the forward
// S-box, computed at elaboration by aes_pkg::gen_inv_sbox() and then read
// like a ROM.
//
// Interface: din (8 bits) in, dout = S^-1(din) out. Purely combinational.
module aes_inv_sbox
  import aes_pkg::byte_t, aes_pkg::sbox_table_t, aes_pkg::gen_inv_sbox;
(
  input  byte_t din,
  output byte_t dout
);

  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

  assign dout = INV_SBOX[din];

endmodule
