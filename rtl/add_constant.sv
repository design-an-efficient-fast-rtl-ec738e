// add_constant: the AddConstants step of an LED round.
//
// XORs a round-dependent constant matrix into the first two columns of the
// state; columns 2 and 3 pass unchanged. With ks the key length in bits
// (KEY_LEN, 64 by default, so ks[7:4] = 4 and ks[3:0] = 0; 128 gives 8 and 0) and rc the 6-bit round
// constant from rc_generator:
//   column 0: row0 ^= ks[7:4], row1 ^= 1 ^ ks[7:4], row2 ^= 2 ^ ks[3:0], row3 ^= 3 ^ ks[3:0]
//   column 1: row0 ^= rc[5:3], row1 ^= rc[2:0],     row2 ^= rc[5:3],     row3 ^= rc[2:0]
// Combinational, no clock. The constant layout is LED's published definition.
module add_constant
  import led_pkg::*;
#(
  parameter int unsigned KEY_LEN = led_pkg::LED_KEY_BITS
) (
  input  state_t state_in,
  input  rc_t    rc,
  output state_t state_out
);

  localparam logic [7:0] KS = 8'(KEY_LEN);

  always_comb begin
    state_out = state_in;
    state_out[0]  = state_in[0]  ^ KS[7:4];
    state_out[4]  = state_in[4]  ^ (4'h1 ^ KS[7:4]);
    state_out[8]  = state_in[8]  ^ (4'h2 ^ KS[3:0]);
    state_out[12] = state_in[12] ^ (4'h3 ^ KS[3:0]);
    state_out[1]  = state_in[1]  ^ {1'b0, rc[5:3]};
    state_out[5]  = state_in[5]  ^ {1'b0, rc[2:0]};
    state_out[9]  = state_in[9]  ^ {1'b0, rc[5:3]};
    state_out[13] = state_in[13] ^ {1'b0, rc[2:0]};
  end

endmodule
