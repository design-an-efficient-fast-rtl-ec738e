// tb_add_round_key: checks the conditional key XOR with flag 0 and 1 on
// random states and keys.
module tb_add_round_key;
  import led_pkg::*;
  state_t      din, key, dout;
  logic        flag;
  logic [63:0] v, k, expv;
  int checks = 0, failures = 0;

  add_round_key dut (.state_in(din), .key(key), .flag(flag), .state_out(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      v = {$urandom(), $urandom()};
      k = {$urandom(), $urandom()};
      flag = n[0];
      din = state_t'(v);
      key = state_t'(k);
      #1;
      expv = flag ? (v ^ k) : v;
      checks++;
      if (64'(dout) !== expv) begin
        failures++;
        $display("FAIL flag=%b in=%h key=%h out=%h expected=%h", flag, v, k, 64'(dout), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
