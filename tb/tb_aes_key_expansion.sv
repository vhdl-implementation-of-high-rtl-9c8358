// tb_aes_key_expansion: loads keys and checks all eleven stored round keys
// against the standard's example key schedule and the reference model, the
// timing of key_busy/key_ready (ready exactly NR cycles after key_start),
// and that a key_start during an expansion restarts it with the new key.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  localparam int NR = 10;
  logic         clk = 0, rst_n = 0, key_start = 0;
  logic [127:0] key_in = '0, round_key;
  logic [3:0]   rk_idx = '0;
  logic         key_ready, key_busy;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Start an expansion and check the ready timing.
  task automatic expand(logic [127:0] key);
    @(negedge clk); key_in = key; key_start = 1;
    @(negedge clk); key_start = 0;
    for (int c = 1; c <= NR; c++) begin
      check(key_busy && !key_ready, $sformatf("busy during cycle %0d", c));
      @(negedge clk);
    end
    check(key_ready && !key_busy, "key_ready NR cycles after key_start");
  endtask

  task automatic check_keys(logic [127:0] key);
    for (int r = 0; r <= NR; r++) begin
      rk_idx = 4'(r); #1;
      check(round_key === ref_round_key(key, r),
            $sformatf("round key %0d = %032h expected %032h", r, round_key, ref_round_key(key, r)));
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!key_ready && !key_busy, "idle after reset");
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rk_idx = 4'd1; #1;
    check(round_key === 128'ha0fafe1788542cb123a339392a6c7605, "example round key 1");
    rk_idx = 4'd10; #1;
    check(round_key === 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "example round key 10");
    check_keys(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int i = 0; i < 10; i++) begin
      logic [127:0] k;
      k = rand128();
      expand(k);
      check_keys(k);
    end
    // restart in the middle of an expansion
    @(negedge clk); key_in = rand128(); key_start = 1;
    @(negedge clk); key_start = 0;
    repeat (4) @(negedge clk);
    begin
      logic [127:0] k;
      k = rand128();
      expand(k);
      check_keys(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
