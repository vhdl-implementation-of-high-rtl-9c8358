// aes_inv_shift_rows: the InvShiftRows transformation.
//
// Row r of the 4x4 byte state is rotated cyclically right by r bytes, undoing
// ShiftRows: output byte (r, c) takes input byte (r, (c - r) mod 4). Pure
// wiring.
//
// Interface: state_in -> state_out, 128 bits each. Combinational.
module aes_inv_shift_rows
  import aes_pkg::state_t;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8];
    end
  end

endmodule
