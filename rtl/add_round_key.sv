// add_round_key: conditional key addition at the start of each 4-round step.
//
// When flag is 1 the 64-bit key is XORed into the state; when flag is 0 the
// state passes unchanged. The controller raises flag on iterations
// 0, 4, 8, ..., 28, so the key enters once per step of four rounds, as in the
// document's flow chart. LED-64 has no key schedule: the same key is used
// every time. Combinational, no clock.
module add_round_key
  import led_pkg::*;
(
  input  state_t state_in,
  input  state_t key,
  input  logic   flag,
  output state_t state_out
);

  assign state_out = flag ? (state_in ^ key) : state_in;

endmodule
