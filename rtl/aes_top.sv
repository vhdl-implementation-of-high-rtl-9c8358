// aes_top: iterative AES-128 encryptor/decryptor.
//
// A single 128-bit state register is looped through one round of logic per
// clock (the iterative looping architecture): the key expansion unit first
// derives and stores Round Key[0..10], then a block is loaded with the
// initial AddRoundKey and runs 10 rounds, the last without (Inv)MixColumns.
// Encryption and decryption each have their own round logic (aes_enc_round,
// aes_dec_round), both built on 256-entry S-box lookup tables; a multiplexer
// chosen by the mode picks which result is written back.
//
// Interface:
//   key_start/key_in  load a 128-bit key; key_ready rises NR cycles later.
//                     key_start is ignored while a block is in progress.
//   start/decrypt/data_in  start one block (decrypt = 0 encrypts) when idle
//                     and key_ready is high.
//   data_out/done     done pulses for one cycle NR cycles after the start
//                     edge; data_out holds the result from then until the
//                     next start.
//   busy              high while a block is in progress.
// Throughput is one 128-bit block every NR + 1 = 11 cycles in either mode.
// Port names, handshake and reset (asynchronous, active low) are choices of
// this design.
// Lint reports rst_n as used both synchronously and asynchronously
// (SYNCASYNCNET); the synchronous use is only the 'disable iff' of the
// assertions below, which generate no hardware, so the warning stands.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = NR
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_start,
  input  state_t key_in,
  output logic   key_ready,
  input  logic   start,
  input  logic   decrypt,
  input  state_t data_in,
  output state_t data_out,
  output logic   done,
  output logic   busy
);

  logic       load, round_en, last_round, dec_q, key_busy;
  logic [3:0] rk_idx;
  state_t     round_key, state_q, init_q, enc_q, dec_out;

  aes_key_expansion #(.NR_P(NR_P)) u_keyexp (
    .clk      (clk),
    .rst_n    (rst_n),
    .key_start(key_start && !busy),
    .key_in   (key_in),
    .rk_idx   (rk_idx),
    .round_key(round_key),
    .key_ready(key_ready),
    .key_busy (key_busy)
  );

  aes_ctrl #(.NR_P(NR_P)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start && !key_start),
    .decrypt   (decrypt),
    .key_ready (key_ready),
    .load      (load),
    .round_en  (round_en),
    .last_round(last_round),
    .rk_idx    (rk_idx),
    .busy      (busy),
    .done      (done),
    .dec_q     (dec_q)
  );

  // Initial AddRoundKey, applied as the block is loaded.
  aes_add_round_key u_ark0 (.state_in(data_in), .round_key(round_key), .state_out(init_q));

  aes_enc_round u_enc (.state_in(state_q), .round_key(round_key), .last_round(last_round), .state_out(enc_q));
  aes_dec_round u_dec (.state_in(state_q), .round_key(round_key), .last_round(last_round), .state_out(dec_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state_q <= '0;
    else if (load)     state_q <= init_q;
    else if (round_en) state_q <= dec_q ? dec_out : enc_q;
  end

  assign data_out = state_q;

  // The key store must not change under a running block.
  a_no_key_busy_run: assert property (@(posedge clk) disable iff (!rst_n)
      busy |-> !key_busy);

endmodule
