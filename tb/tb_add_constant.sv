// tb_add_constant: applies every round constant to fixed and random states
// and compares with the reference AddConstants of led_model_pkg, for the
// default 64-bit key length and for a 128-bit key length.
module tb_add_constant;
  import led_pkg::*;
  import led_model_pkg::*;
  state_t      din, dout;
  rc_t         rc;
  logic [63:0] v, expv;
  int checks = 0, failures = 0;

  state_t      dout128;

  add_constant dut (.state_in(din), .rc(rc), .state_out(dout));
  add_constant #(.KEY_LEN(128)) dut128 (.state_in(din), .rc(rc), .state_out(dout128));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      v  = (k == 0) ? 64'h0 : {$urandom(), $urandom()};
      rc = (k < 64) ? rc_t'(k) : rc_t'($urandom());
      din = state_t'(v);
      #1;
      expv = m_addconst(v, rc);
      checks++;
      if (64'(dout) !== expv) begin
        failures++;
        $display("FAIL in=%h rc=%h out=%h expected=%h", v, rc, 64'(dout), expv);
      end
      checks++;
      if (64'(dout128) !== m_addconst(v, rc, 1)) begin
        failures++;
        $display("FAIL 128-bit key length: in=%h rc=%h out=%h", v, rc, 64'(dout128));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
