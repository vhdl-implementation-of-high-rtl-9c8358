// tb_aes_sbox: exhaustive check of the S-box table against the reference
// model (inverse by search, then affine map) plus sample entries of the standard table.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.din(din), .dout(dout));

  task automatic chk(logic [7:0] x, logic [7:0] exp);
    din = x; #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", x, dout, exp);
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
    chk(8'h00, 8'h63); chk(8'h01, 8'h7c); chk(8'h53, 8'hed); chk(8'hff, 8'h16);
    for (int i = 0; i < 256; i++) chk(8'(i), SB[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
