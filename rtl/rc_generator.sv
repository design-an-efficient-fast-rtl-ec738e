// rc_generator: the round-constant table, addressed by the iteration number.
//
// Returns the 6-bit LED round constant rc for round i (0..N_ROUNDS-1). The
// table is filled at elaboration from the LED LFSR (led_pkg::led_rc): starting
// from zero, each step shifts left and feeds in rc5 ^ rc4 ^ 1, giving
// 01 03 07 0F 1F 3E 3D 3B 37 2F 1E 3C ... for rounds 0, 1, 2, ...
// Combinational read of a constant ROM; no clock. An iteration number outside
// the table reads 0.
// A table indexed by the iteration number from the controller follows the
// document's block diagram; the LFSR that fills it is the cipher's definition.
module rc_generator
  import led_pkg::*;
#(
  parameter int unsigned N_ROUNDS = led_pkg::ROUNDS,
  localparam int unsigned ITER_W  = $clog2(N_ROUNDS)
) (
  input  logic [ITER_W-1:0] iter,
  output rc_t               rc
);

  rc_t table_q [N_ROUNDS];

  for (genvar i = 0; i < N_ROUNDS; i++) begin : g_tab
    assign table_q[i] = led_rc(i);
  end

  assign rc = (int'(iter) < N_ROUNDS) ? table_q[iter] : '0;

endmodule
