// tb_aes_inv_sub_bytes: self-checking test of aes_inv_sub_bytes. Known vectors from the worked
// example of the AES standard (round 1 of its Appendix B), then random
// states compared with the independent reference model in aes_ref_pkg.
module tb_aes_inv_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_inv_sub_bytes dut (.state_in(state_in), .state_out(state_out));

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
    chk(128'hd42711aee0bf98f1b8b45de51e415230, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int i = 0; i < 500; i++) begin
      logic [127:0] v;
      v = rand128();
      chk(v, ref_sub_bytes(v, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
