// tb_aes_add_round_key: checks AddRoundKey on the standard's worked example
// (end of round 1) and on random state/key pairs, computing the XOR byte by
// byte in the testbench.
module tb_aes_add_round_key;
  logic [127:0] state_in, round_key, state_out;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state_in(state_in), .round_key(round_key), .state_out(state_out));

  task automatic chk(logic [127:0] s, logic [127:0] k, logic [127:0] exp);
    state_in = s; round_key = k; #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL s=%032h k=%032h out=%032h expected %032h", s, k, state_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(128'h046681e5e0cb199a48f8d37a2806264c, 128'ha0fafe1788542cb123a339392a6c7605,
        128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 500; i++) begin
      logic [127:0] s;
      logic [127:0] k;
      logic [127:0] e;
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) e[b] = (s[b] != k[b]);
      chk(s, k, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
