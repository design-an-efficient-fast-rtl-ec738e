// tb_present_sbox: exhaustive check of the 4-bit PRESENT S-box against the
// reference table in led_model_pkg, plus a check that the map is a permutation.
module tb_present_sbox;
  import led_model_pkg::*;
  logic [3:0] din, dout;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  present_sbox dut (.din(din), .dout(dout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int x = 0; x < 16; x++) begin
      din = 4'(x);
      #1;
      checks++;
      if (dout !== m_sbox(din)) begin
        failures++;
        $display("FAIL S(%h) = %h, expected %h", din, dout, m_sbox(din));
      end
      seen[dout] = 1'b1;
    end
    checks++;
    if (seen != 16'hFFFF) begin failures++; $display("FAIL not a permutation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
