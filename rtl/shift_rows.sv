// shift_rows: the ShiftRows step of an LED round.
//
// Row r of the 4x4 nibble matrix is rotated left by r cells (row 0 stays,
// row 3 moves by three), all rows at once, so the step is pure wiring:
//   out[r][c] = in[r][(c + r) mod 4]
// Combinational, no clock. The rotation rule is the cipher's; doing all rows
// in parallel follows the document's parallel architecture.
module shift_rows
  import led_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      assign state_out[r*4 + c] = state_in[r*4 + ((c + r) % 4)];
    end
  end

endmodule
