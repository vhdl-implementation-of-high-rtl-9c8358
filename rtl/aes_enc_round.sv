// aes_enc_round: one AES encryption round, all in combinational logic.
//
// The state passes through SubBytes (16 S-box tables), ShiftRows,
// MixColumns and AddRoundKey in that order. In the last round MixColumns is
// bypassed (last_round = 1), as the standard prescribes. The iterative core
// registers the result once per clock, so this whole chain is one cycle.
//
// Interface: state_in, round_key (128 bits), last_round -> state_out.
module aes_enc_round
  import aes_pkg::state_t;
(
  input  state_t state_in,
  input  state_t round_key,
  input  logic   last_round,
  output state_t state_out
);

  state_t sub_q, shift_q, mix_q, pre_key;

  aes_sub_bytes     u_sub   (.state_in(state_in), .state_out(sub_q));
  aes_shift_rows    u_shift (.state_in(sub_q),    .state_out(shift_q));
  aes_mix_columns   u_mix   (.state_in(shift_q),  .state_out(mix_q));

  assign pre_key = last_round ? shift_q : mix_q;

  aes_add_round_key u_ark (.state_in(pre_key), .round_key(round_key), .state_out(state_out));

endmodule
