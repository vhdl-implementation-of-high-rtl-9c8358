// aes_sub_bytes: the SubBytes transformation.
//
// Each of the 16 state bytes is replaced independently through its own
// S-box lookup table (16 aes_sbox instances), so the whole 128-bit state is
// substituted in one combinational pass.
//
// Interface: state_in -> state_out, 128 bits each. Combinational.
module aes_sub_bytes
  import aes_pkg::state_t;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (
      .din (state_in[127 - 8*i -: 8]),
      .dout(state_out[127 - 8*i -: 8])
    );
  end

endmodule
