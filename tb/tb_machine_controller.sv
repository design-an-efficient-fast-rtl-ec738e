// tb_machine_controller: drives start pulses into the controller and checks,
// cycle by cycle, the iteration number, the key flag (i mod 4 == 0), the
// key-half select (step parity), load,
// advance, last, busy and the one-cycle done pulse 32 cycles after start.
// Also checks that a start while busy is ignored and that reset returns the
// controller to idle.
module tb_machine_controller;
  import led_pkg::*;
  logic  clk = 0, rst_n = 0, start = 0;
  logic [4:0] iter;
  logic  key_sel, flag, load, advance, last, busy, done;
  int checks = 0, failures = 0;

  machine_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // One operation; optionally raise start again in the middle of it.
  task automatic run_op(bit poke_start);
    @(negedge clk);
    expect_eq("busy idle", busy, 0);
    start = 1;
    #1;
    expect_eq("load", load, 1);
    expect_eq("iter0", iter, 0);
    expect_eq("flag0", flag, 1);
    expect_eq("key_sel0", key_sel, 0);
    expect_eq("advance0", advance, 1);
    for (int i = 1; i < 32; i++) begin
      @(negedge clk);
      start = poke_start && (i == 10);
      #1;
      expect_eq("busy", busy, 1);
      expect_eq("load", load, 0);
      expect_eq("iter", iter, i);
      expect_eq("flag", flag, (i % 4 == 0));
      expect_eq("key_sel", key_sel, (i / 4) % 2);
      expect_eq("advance", advance, 1);
      expect_eq("last", last, (i == 31));
      expect_eq("done early", done, 0);
    end
    @(negedge clk);
    start = 0;
    expect_eq("done", done, 1);
    expect_eq("busy after", busy, 0);
    expect_eq("iter after", iter, 0);
    @(negedge clk);
    expect_eq("done pulse", done, 0);
    expect_eq("advance idle", advance, 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_op(0);
    run_op(1);
    // reset in the middle of an operation
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    rst_n = 0; #1;
    expect_eq("reset busy", busy, 0);
    expect_eq("reset iter", iter, 0);
    @(negedge clk); rst_n = 1;
    run_op(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
