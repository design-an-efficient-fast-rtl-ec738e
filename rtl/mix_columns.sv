// mix_columns: the MixColumnsSerial step of an LED round, computed in parallel.
//
// LED defines MixColumnsSerial as four applications of a serial (companion)
// matrix A to each column. This unit applies the equivalent single matrix
// M = A^4 to all four columns at once:
//   out[r][c] = XOR over j of MDS[r*4+j] * in[j][c]     (GF(2^4), x^4+x+1)
// The 16 entries of MDS are the "mix column constants" (led_pkg::MDS); each
// constant multiplier is a small XOR network. Combinational, no clock.
// Computing the step in one pass instead of four serial passes is the
// document's choice ("Mix Column Parallel"); the matrix values are LED's own.
module mix_columns
  import led_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        nibble_t acc;
        acc = '0;
        for (int j = 0; j < 4; j++)
          acc = acc ^ gf16_mul(MDS[r*4 + j], state_in[j*4 + c]);
        state_out[r*4 + c] = acc;
      end
    end
  end

endmodule
