// tb_aes_top: end-to-end test of the AES-128 encryptor/decryptor at its
// default parameters. It loads keys, encrypts and decrypts the standard's
// example vectors and random blocks, and compares every result with the
// reference model in aes_ref_pkg. It checks the latency (done NR cycles
// after the start edge) and the rate (back-to-back blocks every NR + 1
// cycles), and makes each mechanism of the design happen and counts it:
// key expansion, encryption, decryption, a mode switch between blocks,
// a start in the done cycle, a start ignored while keys are expanding, a
// start ignored while busy and a key_start ignored while busy.
module tb_aes_top;
  import aes_ref_pkg::*;
  localparam int NR = 10;
  logic         clk = 0, rst_n = 0, key_start = 0, start = 0, decrypt = 0;
  logic [127:0] key_in = '0, data_in = '0, data_out;
  logic         key_ready, done, busy;
  int checks = 0, failures = 0;
  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_b2b = 0;
  int n_ign_keys = 0, n_ign_busy = 0, n_ign_key_busy = 0;
  logic [127:0] cur_key;
  bit last_dec = 0, have_last = 0;

  aes_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  task automatic load_key(logic [127:0] k, bit try_start);
    @(negedge clk); key_in = k; key_start = 1;
    @(negedge clk); key_start = 0;
    if (try_start) begin
      // a start while keys are still expanding must be ignored
      start = 1; data_in = rand128();
      @(negedge clk); start = 0;
      check(!busy, "start ignored while keys expand");
      if (!busy) n_ign_keys++;
    end
    while (!key_ready) @(negedge clk);
    cur_key = k;
    n_keyexp++;
  endtask

  // Run one block starting at the current negedge. poke: try start and
  // key_start while busy; they must change nothing.
  task automatic run_block(bit dec, logic [127:0] din, bit poke, output logic [127:0] res);
    logic [127:0] exp = dec ? ref_decrypt(din, cur_key) : ref_encrypt(din, cur_key);
    int lat = 0;
    if (have_last && last_dec != dec) n_switch++;
    last_dec = dec; have_last = 1;
    start = 1; decrypt = dec; data_in = din;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (!done) begin
      if (poke && lat == 3) begin
        start = 1; decrypt = ~dec; data_in = rand128();
        key_start = 1; key_in = rand128();
        n_ign_busy++; n_ign_key_busy++;
      end else begin
        start = 0; key_start = 0; decrypt = dec;
      end
      @(negedge clk);
      lat++;   // edges after the start edge
      if (lat > 3 * NR) break;
    end
    start = 0; key_start = 0;
    check(lat == NR, $sformatf("latency %0d cycles, expected %0d", lat, NR));
    check(data_out === exp, $sformatf("%s %032h -> %032h expected %032h",
          dec ? "dec" : "enc", din, data_out, exp));
    check(key_ready, "keys untouched by key_start while busy");
    res = data_out;
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] r, ct;
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // example of the standard's Appendix B
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1);
    run_block(0, 128'h3243f6a8885a308d313198a2e0370734, 0, r);
    check(r === 128'h3925841d02dc09fbdc118597196a0b32, "Appendix B ciphertext");
    @(negedge clk);
    run_block(1, r, 1, r);
    check(r === 128'h3243f6a8885a308d313198a2e0370734, "Appendix B round trip");
    // example of Appendix C.1
    load_key(128'h000102030405060708090a0b0c0d0e0f, 0);
    run_block(0, 128'h00112233445566778899aabbccddeeff, 0, ct);
    check(ct === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "C.1 ciphertext");
    // decryption started in the done cycle: one block per NR + 1 cycles
    run_block(1, ct, 0, r);
    n_b2b++;
    check(r === 128'h00112233445566778899aabbccddeeff, "C.1 plaintext");
    // random keys and blocks, mixed modes, some back to back
    for (int k = 0; k < 6; k++) begin
      load_key(rand128(), k[0]);
      for (int b = 0; b < 8; b++) begin
        bit dec;
        dec = ($urandom % 2) == 1;
        run_block(dec, rand128(), b == 5, r);
        if (b[0]) @(negedge clk); else n_b2b++;
      end
    end
    begin
      string names[8] = '{"key expansion", "encryption", "decryption", "mode switch",
                          "back-to-back start", "start ignored during key expansion",
                          "start ignored while busy", "key_start ignored while busy"};
      int counts[8];
      counts = '{n_keyexp, n_enc, n_dec, n_switch, n_b2b, n_ign_keys, n_ign_busy, n_ign_key_busy};
      for (int i = 0; i < 8; i++) begin
        $display("mechanism %-36s %0d", names[i], counts[i]);
        check(counts[i] > 0, {"mechanism never exercised: ", names[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
