// tb_sub_cells: checks sub_cells (16 parallel PRESENT S-boxes) on fixed and random states against the
// reference model in led_model_pkg.
module tb_sub_cells;
  import led_pkg::*;
  import led_model_pkg::*;
  state_t      din, dout;
  logic [63:0] expv;
  int checks = 0, failures = 0;

  sub_cells dut (.state_in(din), .state_out(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] v);
    din = state_t'(v);
    #1;
    expv = m_subcells(v);
    checks++;
    if (64'(dout) !== expv) begin
      failures++;
      $display("FAIL in=%h out=%h expected=%h", v, 64'(dout), expv);
    end
  endtask

  initial begin
    check(64'h0);
    check(64'hFFFF_FFFF_FFFF_FFFF);
    check(64'h0123_4567_89AB_CDEF);
    for (int n = 0; n < 16; n++) check(64'h1 << (4*n));
    for (int k = 0; k < 500; k++) check({$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
