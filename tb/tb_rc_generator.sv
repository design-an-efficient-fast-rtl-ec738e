// tb_rc_generator: reads all 32 entries of the default round-constant table,
// and all 48 of a table sized for the 128-bit key, and compares them with the
// published LED constant list. Indices past the end must read 0.
module tb_rc_generator;
  import led_pkg::*;
  import led_model_pkg::*;
  logic [4:0] iter;
  rc_t   rc;
  int checks = 0, failures = 0;

  logic [5:0] iter48;
  rc_t        rc48;

  rc_generator dut (.iter(iter), .rc(rc));
  rc_generator #(.N_ROUNDS(48)) dut48 (.iter(iter48), .rc(rc48));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    for (int i = 0; i < 64; i++) begin
      iter48 = 6'(i);
      #1;
      checks++;
      if (rc48 !== ((i < 48) ? RC_LIST[i] : 6'h00)) begin
        failures++;
        $display("FAIL 48-entry rc[%0d] = %h", i, rc48);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      iter = 5'(i);
      #1;
      checks++;
      if (rc !== RC_LIST[i]) begin
        failures++;
        $display("FAIL rc[%0d] = %h, expected %h", i, rc, RC_LIST[i]);
      end
    end
    for (int i = 0; i < 64; i++) begin
      iter48 = 6'(i);
      #1;
      checks++;
      if (rc48 !== ((i < 48) ? RC_LIST[i] : 6'h00)) begin
        failures++;
        $display("FAIL 48-entry rc[%0d] = %h", i, rc48);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
