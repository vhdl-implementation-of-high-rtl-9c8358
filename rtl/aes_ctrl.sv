// aes_ctrl: round controller of the iterative AES-128 core.
//
// One datapath register holds the state, and the controller loops it
// through the round logic. On an accepted start it asserts load for one
// cycle, so the state register takes data_in ^ first round key (the extra
// AddRoundKey ahead of round 1). It then asserts round_en for NR cycles,
// rounds 1..NR; last_round marks round NR, in which (Inv)MixColumns is
// skipped. Rounds 1..NR-1 are the Nr - 1 loop iterations of full rounds.
//
// Round-key index: encryption reads key r in round r (key 0 at load);
// decryption reads them in reverse, key NR at load and key NR - r in round r.
// The mode is sampled with start and held in dec_q for the whole block.
//
// Timing: start is accepted on a rising edge when idle and key_ready is
// high; busy is high for the next NR cycles; done is a one-cycle strobe
// raised by the edge that writes round NR, NR cycles after the start edge.
// A new start is accepted in the cycle done is high, so one block takes
// NR + 1 cycles. start while busy is ignored. The handshake, the reset and
// the key-ready interlock are choices of this design.
// Lint reports rst_n as used both synchronously and asynchronously
// (SYNCASYNCNET); the synchronous use is only the 'disable iff' of the
// assertions below, which generate no hardware, so the warning stands.
module aes_ctrl
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = NR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       decrypt,
  input  logic       key_ready,
  output logic       load,
  output logic       round_en,
  output logic       last_round,
  output logic [3:0] rk_idx,
  output logic       busy,
  output logic       done,
  output logic       dec_q
);

  typedef enum logic {S_IDLE, S_RUN} ctrl_state_e;

  ctrl_state_e state_q;
  logic [3:0]  rnd_q;

  assign busy       = (state_q == S_RUN);
  assign load       = (state_q == S_IDLE) && start && key_ready;
  assign round_en   = busy;
  assign last_round = busy && (rnd_q == 4'(NR_P));

  always_comb begin
    if (state_q == S_IDLE) rk_idx = decrypt ? 4'(NR_P) : 4'd0;
    else                   rk_idx = dec_q ? 4'(NR_P) - rnd_q : rnd_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      rnd_q   <= '0;
      dec_q   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (load) begin
          state_q <= S_RUN;
          rnd_q   <= 4'd1;
          dec_q   <= decrypt;
        end
        S_RUN: begin
          rnd_q <= rnd_q + 4'd1;
          if (last_round) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: done comes only at the end of a block, and the round
  // counter never leaves 1..NR while busy.
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
      done |-> $past(last_round));
  a_rnd_range: assert property (@(posedge clk) disable iff (!rst_n)
      busy |-> (rnd_q >= 4'd1 && rnd_q <= 4'(NR_P)));

endmodule
