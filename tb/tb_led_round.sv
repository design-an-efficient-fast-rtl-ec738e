// tb_led_round: runs the combinational round for every iteration number,
// with flag = (i mod 4 == 0), on random states and keys, and compares with
// the reference round of led_model_pkg. It also chains the 32 rounds plus
// the final key XOR to reproduce the published LED-64 test vectors.
module tb_led_round;
  import led_pkg::*;
  import led_model_pkg::*;
  state_t      din, key, dout;
  logic [4:0]  iter;
  logic        flag;
  logic [63:0] v, k, expv, s;
  int checks = 0, failures = 0;

  led_round dut (.state_in(din), .key(key), .iter(iter), .flag(flag), .state_out(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chain(logic [63:0] p, logic [63:0] kk, logic [63:0] c);
    s = p;
    for (int i = 0; i < 32; i++) begin
      din = state_t'(s); key = state_t'(kk); iter = 5'(i); flag = (i % 4 == 0);
      #1;
      s = 64'(dout);
    end
    s = s ^ kk;
    checks++;
    if (s !== c) begin
      failures++;
      $display("FAIL chained P=%h K=%h C=%h expected %h", p, kk, s, c);
    end
  endtask

  initial begin
    for (int n = 0; n < 320; n++) begin
      v = {$urandom(), $urandom()};
      k = {$urandom(), $urandom()};
      din = state_t'(v); key = state_t'(k); iter = 5'(n % 32); flag = (n % 4 == 0);
      #1;
      expv = m_round(v, k, n % 32);
      checks++;
      if (64'(dout) !== expv) begin
        failures++;
        $display("FAIL i=%0d in=%h key=%h out=%h expected=%h", n % 32, v, k, 64'(dout), expv);
      end
    end
    chain(64'h0, 64'h0, 64'h39C2_4010_03A0_C798);
    chain(64'h0123_4567_89AB_CDEF, 64'h0123_4567_89AB_CDEF, 64'hA003_551E_3893_FC58);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
