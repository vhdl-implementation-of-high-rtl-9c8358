// tb_aes_dec_round: checks one decryption round (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns),
// with and without the last-round bypass, on vectors from the standard's
// worked example and on random states and keys against aes_ref_pkg.
module tb_aes_dec_round;
  import aes_ref_pkg::*;
  logic [127:0] state_in, round_key, state_out;
  logic         last_round;
  int checks = 0, failures = 0;

  aes_dec_round dut (.state_in(state_in), .round_key(round_key), .last_round(last_round), .state_out(state_out));

  task automatic chk(logic [127:0] s, logic [127:0] k, logic last, logic [127:0] exp);
    state_in = s; round_key = k; last_round = last; #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL s=%032h k=%032h last=%0d out=%032h expected %032h", s, k, last, state_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    // InvShiftRows/InvSubBytes undo round 1 of the standard's example
    chk(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h0, 1'b1, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    // key chosen so that InvMixColumns sees the MixColumns output of the example
    chk(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h193de3bea0f4e22b9ac68d2ae9f84808 ^ 128'h046681e5e0cb199a48f8d37a2806264c,
        1'b0, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 400; i++) begin
      logic [127:0] s;
      logic [127:0] k;
      logic last;
      s = rand128();
      k = rand128();
      last = i[0];
      chk(s, k, last, last ? (ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ k) : ref_mix_columns(ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ k, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
