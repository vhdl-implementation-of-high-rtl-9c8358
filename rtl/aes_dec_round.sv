// aes_dec_round: one AES decryption round, all in combinational logic.
//
// The state passes through InvShiftRows, InvSubBytes, AddRoundKey and
// InvMixColumns in that order (the straightforward inverse cipher, with the
// round keys applied in reverse order by the controller). In the last round
// InvMixColumns is bypassed (last_round = 1).
//
// Interface: state_in, round_key (128 bits), last_round -> state_out.
module aes_dec_round
  import aes_pkg::state_t;
(
  input  state_t state_in,
  input  state_t round_key,
  input  logic   last_round,
  output state_t state_out
);

  state_t shift_q, sub_q, ark_q, mix_q;

  aes_inv_shift_rows  u_ishift (.state_in(state_in), .state_out(shift_q));
  aes_inv_sub_bytes   u_isub   (.state_in(shift_q),  .state_out(sub_q));
  aes_add_round_key   u_ark    (.state_in(sub_q), .round_key(round_key), .state_out(ark_q));
  aes_inv_mix_columns u_imix   (.state_in(ark_q),    .state_out(mix_q));

  assign state_out = last_round ? ark_q : mix_q;

endmodule
