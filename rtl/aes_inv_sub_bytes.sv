// aes_inv_sub_bytes: the InvSubBytes transformation.
//
// Each of the 16 state bytes goes through its own inverse S-box lookup table
// (16 aes_inv_sbox instances), substituting the whole state in one pass.
//
// Interface: state_in -> state_out, 128 bits each. Combinational.
module aes_inv_sub_bytes
  import aes_pkg::state_t;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_inv_sbox
    aes_inv_sbox u_inv_sbox (
      .din (state_in[127 - 8*i -: 8]),
      .dout(state_out[127 - 8*i -: 8])
    );
  end

endmodule
