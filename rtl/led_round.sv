// led_round: one complete LED round as a single combinational path.
//
// The state passes, in order, through
//   add_round_key (only when flag = 1) -> add_constant (rc of this iteration)
//   -> sub_cells (16 S-boxes) -> shift_rows -> mix_columns (parallel)
// so that one new state matrix is produced per clock cycle when the result
// is registered by the caller. The round constant comes from rc_generator,
// addressed by the iteration number. key is the 64-bit subkey of this step
// (the caller picks the key half for a 128-bit key); KEY_LEN only sets the
// key-length constant of AddConstants. The order of the steps and the
// one-round-per-cycle organisation follow the document's flow chart; the
// split into these submodules is this design's.
module led_round
  import led_pkg::*;
#(
  parameter int unsigned KEY_LEN  = led_pkg::LED_KEY_BITS,
  parameter int unsigned N_ROUNDS = led_rounds(KEY_LEN),
  localparam int unsigned ITER_W  = $clog2(N_ROUNDS)
) (
  input  state_t            state_in,
  input  state_t            key,
  input  logic [ITER_W-1:0] iter,
  input  logic              flag,
  output state_t            state_out
);

  state_t s_key, s_ac, s_sc, s_sr;
  rc_t    rc;

  add_round_key u_ark (.state_in(state_in), .key(key), .flag(flag), .state_out(s_key));
  rc_generator  #(.N_ROUNDS(N_ROUNDS)) u_rc (.iter(iter), .rc(rc));
  add_constant  #(.KEY_LEN(KEY_LEN))   u_ac (.state_in(s_key), .rc(rc), .state_out(s_ac));
  sub_cells     u_sc  (.state_in(s_ac), .state_out(s_sc));
  shift_rows    u_sr  (.state_in(s_sc), .state_out(s_sr));
  mix_columns   u_mc  (.state_in(s_sr), .state_out(state_out));

endmodule
