// tb_aes_mix_columns: self-checking test of aes_mix_columns. Known vectors from the worked
// example of the AES standard (round 1 of its Appendix B), then random
// states compared with the independent reference model in aes_ref_pkg.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_in(state_in), .state_out(state_out));

  task automatic chk(logic [127:0] x, logic [127:0] exp);
    state_in = x; #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL in=%032h out=%032h expected %032h", x, state_out, exp);
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
    chk(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h046681e5e0cb199a48f8d37a2806264c);
    for (int i = 0; i < 500; i++) begin
      logic [127:0] v;
      v = rand128();
      chk(v, ref_mix_columns(v, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
