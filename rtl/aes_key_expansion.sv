// aes_key_expansion: AES-128 key schedule with a store for all round keys.
//
// The cipher needs eleven 128-bit round keys, Round Key[0] .. Round Key[10];
// decryption uses them in reverse order, so they are all expanded once when
// a key is loaded and kept in an 11-entry register file that the round
// controller reads by index. Expansion is iterative: key_start loads the
// cipher key as Round Key[0], then each clock derives the next round key
// from the previous one,
//   t  = SubWord(RotWord(w3)) ^ {Rcon, 24'h0}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// using four S-box tables, with Rcon starting at 8'h01 and doubled in
// GF(2^8) every round. w0 is bits [127:96] of a key.
//
// Timing: key_start is sampled on a rising edge; key_busy is high for the
// next NR cycles and key_ready rises NR cycles after that edge, then stays
// high until the next key_start. round_key = Round Key[rk_idx] is read
// combinationally. Loading a new key while another is expanding restarts
// the expansion. Storing all keys (rather than deriving them on the fly) and
// the one-key-per-clock rate are choices of this design.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = NR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_start,
  input  state_t     key_in,
  input  logic [3:0] rk_idx,
  output state_t     round_key,
  output logic       key_ready,
  output logic       key_busy
);

  state_t      rk_mem [NR_P + 1];
  state_t      cur_key, next_key;
  byte_t       rcon;
  logic [3:0]  cnt;
  logic [31:0] w0, w1, w2, w3, t, sub_word;

  assign {w0, w1, w2, w3} = cur_key;

  // SubWord(RotWord(w3)): RotWord turns [a0 a1 a2 a3] into [a1 a2 a3 a0].
  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox u_sbox (
      .din (w3[31 - 8*((b + 1) % 4) -: 8]),
      .dout(sub_word[31 - 8*b -: 8])
    );
  end

  assign t = sub_word ^ {rcon, 24'h000000};

  always_comb begin
    logic [31:0] n0, n1, n2, n3;
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    next_key = {n0, n1, n2, n3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_key   <= '0;
      rcon      <= 8'h01;
      cnt       <= '0;
      key_busy  <= 1'b0;
      key_ready <= 1'b0;
    end else if (key_start) begin
      cur_key   <= key_in;
      rcon      <= 8'h01;
      cnt       <= 4'd1;
      key_busy  <= 1'b1;
      key_ready <= 1'b0;
    end else if (key_busy) begin
      cur_key <= next_key;
      rcon    <= xtime(rcon);
      cnt     <= cnt + 4'd1;
      if (cnt == 4'(NR_P)) begin
        key_busy  <= 1'b0;
        key_ready <= 1'b1;
      end
    end
  end

  // Round-key store: entry 0 on key_start, entry cnt while expanding.
  always_ff @(posedge clk) begin
    if (key_start)     rk_mem[0]   <= key_in;
    else if (key_busy) rk_mem[cnt] <= next_key;
  end

  assign round_key = rk_mem[rk_idx];

endmodule
