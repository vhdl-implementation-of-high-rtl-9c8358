// tb_aes_ctrl: cycle-by-cycle check of the round controller. For each block
// it checks load and the first key index in the start cycle, then for rounds
// 1..NR busy, round_en, last_round and the round-key index (ascending for
// encryption, descending for decryption), then the done strobe NR cycles
// after the start edge. It also checks that start is ignored without
// key_ready and while busy (with the mode input toggling), and that a start
// in the done cycle is accepted (one block per NR + 1 cycles).
module tb_aes_ctrl;
  localparam int NR = 10;
  logic       clk = 0, rst_n = 0, start = 0, decrypt = 0, key_ready = 0;
  logic       load, round_en, last_round, busy, done, dec_q;
  logic [3:0] rk_idx;
  int checks = 0, failures = 0;

  aes_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // Called at a negedge with the controller idle or in its done cycle.
  task automatic run_block(bit dec, bit poke);
    start = 1; decrypt = dec; #1;
    check(load && rk_idx == (dec ? 4'(NR) : 4'd0), "load and first key index");
    @(negedge clk); start = 0;
    for (int r = 1; r <= NR; r++) begin
      if (poke) begin start = 1; decrypt = ~dec; end
      #1;
      check(busy && round_en && !load && !done, $sformatf("busy in round %0d", r));
      check(rk_idx == (dec ? 4'(NR - r) : 4'(r)), $sformatf("key index %0d in round %0d", rk_idx, r));
      check(last_round == (r == NR), $sformatf("last_round in round %0d", r));
      @(negedge clk);
      start = 0; decrypt = dec;
    end
    check(done && !busy, "done NR cycles after start");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // no keys yet: start must be ignored
    start = 1; #1;
    check(!load, "no load without key_ready");
    @(negedge clk); start = 0;
    check(!busy, "stays idle without key_ready");
    key_ready = 1;
    run_block(0, 0);
    @(negedge clk);
    check(!done, "done lasts one cycle");
    run_block(1, 1);
    run_block(0, 1);   // back to back, started in the done cycle
    run_block(1, 0);
    @(negedge clk);
    check(!busy && !done, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
