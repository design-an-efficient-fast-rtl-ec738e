// present_sbox: the 4-bit PRESENT S-box, one copy of the substitution used by
// LED's SubCells step.
//
// Purely combinational: dout = S(din) with the PRESENT table
//   x    : 0 1 2 3 4 5 6 7 8 9 A B C D E F
//   S(x) : C 5 6 B 9 0 A D 3 E F 8 4 7 1 2
// The use of the PRESENT S-box is the cipher's own definition; writing it as a
// case table (a 16-entry ROM / LUT) is this design's choice.
module present_sbox (
  input  logic [3:0] din,
  output logic [3:0] dout
);

  always_comb begin
    unique case (din)
      4'h0: dout = 4'hC;
      4'h1: dout = 4'h5;
      4'h2: dout = 4'h6;
      4'h3: dout = 4'hB;
      4'h4: dout = 4'h9;
      4'h5: dout = 4'h0;
      4'h6: dout = 4'hA;
      4'h7: dout = 4'hD;
      4'h8: dout = 4'h3;
      4'h9: dout = 4'hE;
      4'hA: dout = 4'hF;
      4'hB: dout = 4'h8;
      4'hC: dout = 4'h4;
      4'hD: dout = 4'h7;
      4'hE: dout = 4'h1;
      4'hF: dout = 4'h2;
    endcase
  end

endmodule
