// sub_cells: the SubCells step of an LED round, fully parallel.
//
// All 16 nibbles of the 4x4 state are substituted at once by 16 copies of the
// PRESENT S-box (copies 0..15, one per cell), so the whole new state matrix
// is available in the same cycle. Combinational, no clock.
// Sixteen parallel S-box copies is the document's architecture.
module sub_cells
  import led_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    present_sbox u_sbox (
      .din  (state_in[n]),
      .dout (state_out[n])
    );
  end

endmodule
