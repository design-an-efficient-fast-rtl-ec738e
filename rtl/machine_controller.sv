// machine_controller: clock-driven controller that sequences the 32 rounds.
//
// Two states, IDLE and RUN. In IDLE the iteration number is 0; a start pulse
// makes the datapath compute round 0 from the new plaintext on that same
// clock edge (load = 1) and moves the controller to RUN. In RUN the iteration
// number rises by one on every clock edge; the edge that completes round
// ROUNDS-1 (last = 1) returns to IDLE and raises done for one cycle.
// flag = 1 on iterations whose number is a multiple of 4 (0, 4, ..., 28),
// telling the datapath to add the key before that round. key_sel is the
// parity of the step number (iteration / 4): with a 128-bit key the datapath
// adds the first key half on even steps and the second on odd steps.
//
// Interface: start is sampled only in IDLE; a start while busy is ignored.
// advance is the enable of the state register (round computed this edge).
// Timing: start at edge 0 -> rounds 0..N_ROUNDS-1 at edges 0..N_ROUNDS-1 ->
// done high during the following cycle, i.e. N_ROUNDS (32 by default) cycles
// from the start edge.
// The iteration counter and the flag rule are the document's; the handshake
// (start/busy/done), the start-while-busy rule and reset are this design's.
module machine_controller
  import led_pkg::*;
#(
  parameter int unsigned N_ROUNDS = led_pkg::ROUNDS,
  parameter int unsigned STEP     = led_pkg::ROUNDS_PER_STEP,
  localparam int unsigned ITER_W  = $clog2(N_ROUNDS)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic [ITER_W-1:0] iter,
  output logic  key_sel,
  output logic  flag,
  output logic  load,
  output logic  advance,
  output logic  last,
  output logic  busy,
  output logic  done
);

  typedef enum logic {IDLE, RUN} ctrl_state_e;

  typedef logic [ITER_W-1:0] iter_t;

  ctrl_state_e state_q;
  iter_t       cnt_q;

  assign busy    = (state_q == RUN);
  assign load    = (state_q == IDLE) && start;
  assign advance = load || busy;
  assign iter    = cnt_q;
  assign flag    = (int'(cnt_q) % STEP) == 0;
  assign last    = busy && (int'(cnt_q) == N_ROUNDS - 1);
  // Index of the current 4-round step, modulo 2: selects the key half.
  assign key_sel = ((int'(cnt_q) / STEP) % 2) == 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      cnt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          state_q <= RUN;
          cnt_q   <= iter_t'(1);
        end
        RUN: if (last) begin
          state_q <= IDLE;
          cnt_q   <= '0;
          done    <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // The iteration number never leaves IDLE at anything but 0.
  a_idle_iter_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == IDLE) |-> (cnt_q == '0));
  // done is a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);

endmodule
