// led_top: LED block cipher core, one round per clock cycle.
//
// Encrypts a 64-bit plaintext under a KEY_BITS-bit key. With the default
// 64-bit key it runs 32 rounds (8 steps of 4 rounds); with KEY_BITS = 128 it
// runs 48 rounds (12 steps). A single combinational round (led_round:
// conditional key addition, AddConstants, 16 parallel S-boxes, ShiftRows,
// parallel MixColumns) sits in a loop around a 64-bit state register;
// machine_controller supplies the iteration number, the key-addition flag,
// the key-half select and the register enables. After the last round the key
// is added once more and the result is registered as the ciphertext.
//
// Key use: a 64-bit key is added unchanged before every step. A 128-bit key
// is split into K1 = key[127:64] and K2 = key[63:0]; K1 is added before even
// steps (and after the last round) and K2 before odd steps.
//
// Interface: pulse start for one cycle while busy is low, with plaintext and
// key valid in that cycle (both are captured; they may change afterwards).
// busy is high while rounds 1..N-1 run. done pulses for one cycle when
// ciphertext is valid; ciphertext then holds until the next completion.
// Timing: N clock cycles from the start edge to done (32 by default); a new
// start is accepted in the cycle done is high, so back-to-back blocks take N
// cycles each. Reset (rst_n, active low, asynchronous) clears the controller
// and registers.
// The round loop, one state matrix per clock, the parallel S-boxes and
// MixColumns and the flag rule follow the document, as do the step counts for
// both key lengths; the handshake and the output register are this design's.
module led_top
  import led_pkg::*;
#(
  parameter int unsigned KEY_BITS = led_pkg::LED_KEY_BITS,
  localparam int unsigned N_ROUNDS = led_rounds(KEY_BITS),
  localparam int unsigned ITER_W   = $clog2(N_ROUNDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [63:0]         plaintext,
  input  logic [KEY_BITS-1:0] key,
  output logic [63:0]         ciphertext,
  output logic                busy,
  output logic                done
);

  if (KEY_BITS != 64 && KEY_BITS != 128) begin : g_bad_key
    $error("led_top: KEY_BITS must be 64 or 128");
  end

  state_t              state_q;
  logic [KEY_BITS-1:0] key_q, key_cur;
  state_t              round_in, round_key, round_out, final_out;
  state_t              k1, k2;
  logic [ITER_W-1:0]   iter;
  logic                flag, key_sel, load, advance, last;

  machine_controller #(.N_ROUNDS(N_ROUNDS)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .iter    (iter),
    .key_sel (key_sel),
    .flag    (flag),
    .load    (load),
    .advance (advance),
    .last    (last),
    .busy    (busy),
    .done    (done)
  );

  assign key_cur   = load ? key : key_q;
  assign k1        = state_t'(key_cur[KEY_BITS-1 -: 64]);
  assign k2        = state_t'(key_cur[63:0]);
  assign round_in  = load ? state_t'(plaintext) : state_q;
  assign round_key = key_sel ? k2 : k1;

  led_round #(.KEY_LEN(KEY_BITS), .N_ROUNDS(N_ROUNDS)) u_round (
    .state_in  (round_in),
    .key       (round_key),
    .iter      (iter),
    .flag      (flag),
    .state_out (round_out)
  );

  // Final whitening after the last round. The step count is even for both
  // key lengths (8 or 12), so the final key is always K1.
  add_round_key u_final_key (
    .state_in  (round_out),
    .key       (state_t'(key_q[KEY_BITS-1 -: 64])),
    .flag      (1'b1),
    .state_out (final_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= '0;
      key_q      <= '0;
      ciphertext <= '0;
    end else begin
      if (advance) state_q <= round_out;
      if (load)    key_q   <= key;
      if (last)    ciphertext <= final_out;
    end
  end

endmodule
