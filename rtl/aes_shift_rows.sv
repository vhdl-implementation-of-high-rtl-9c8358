// aes_shift_rows: the ShiftRows transformation.
//
// Row r of the 4x4 byte state is rotated cyclically left by r bytes: row 0
// stays, row 1 moves one byte, row 2 two bytes, row 3 three bytes. With byte
// i in row i%4 and column i/4, output byte (r, c) takes input byte
// (r, (c + r) % 4). Pure wiring.
//
// Interface: state_in -> state_out, 128 bits each. Combinational.
module aes_shift_rows
  import aes_pkg::state_t;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
    end
  end

endmodule
