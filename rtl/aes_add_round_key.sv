// aes_add_round_key: the AddRoundKey transformation.
//
// The 128-bit round key is added to the state by bitwise XOR. Because XOR is
// its own inverse, the same block serves encryption and decryption; only the
// order in which round keys are supplied differs.
//
// Interface: state_in, round_key -> state_out, 128 bits each. Combinational.
module aes_add_round_key
  import aes_pkg::state_t;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
