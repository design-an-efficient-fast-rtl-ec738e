// tb_led_top_128: the LED core configured for a 128-bit key (48 rounds, key
// halves alternating by step). Encrypts the two published LED-128 test
// vectors and random blocks, compares with the reference model, checks the
// 48-cycle latency, back-to-back operation and that a start while busy is
// ignored.
module tb_led_top_128;
  import led_model_pkg::*;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [63:0]  plaintext = '0, ciphertext;
  logic [127:0] key = '0;
  logic         busy, done;
  int checks = 0, failures = 0;
  int n_ignored = 0, n_b2b = 0;

  led_top #(.KEY_BITS(128)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(logic [63:0] p, logic [127:0] k, logic [63:0] exp, bit poke_busy);
    int cycles;
    @(negedge clk);
    plaintext = p; key = k; start = 1;
    @(negedge clk);
    start = 0; cycles = 1;
    plaintext = ~p; key = ~k;
    while (!done) begin
      start = poke_busy && cycles == 20;
      if (start) n_ignored++;
      @(negedge clk);
      cycles++;
    end
    start = 0;
    checks++;
    if (cycles != 48) begin failures++; $display("FAIL latency %0d, expected 48", cycles); end
    checks++;
    if (ciphertext !== exp) begin
      failures++;
      $display("FAIL P=%h K=%h C=%h expected %h", p, k, ciphertext, exp);
    end
  endtask

  logic [63:0]  p, p2;
  logic [127:0] k, k2;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt(64'h0, 128'h0, 64'h3DEC_B2A0_850C_DBA1, 0);
    encrypt(64'h0123_4567_89AB_CDEF, 128'h0123_4567_89AB_CDEF_0123_4567_89AB_CDEF,
            64'hD6B8_2458_7F01_4FC2, 0);
    checks++;
    if (m_encrypt128(64'h0, 128'h0) !== 64'h3DEC_B2A0_850C_DBA1) begin
      failures++; $display("FAIL reference model vector");
    end
    for (int n = 0; n < 10; n++) begin
      p = {$urandom(), $urandom()};
      k = {$urandom(), $urandom(), $urandom(), $urandom()};
      encrypt(p, k, m_encrypt128(p, k), n == 2);
    end
    // back-to-back: start again in the done cycle
    p2 = {$urandom(), $urandom()};
    k2 = {$urandom(), $urandom(), $urandom(), $urandom()};
    plaintext = p2; key = k2; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL back-to-back start not taken"); end
    while (!done) @(negedge clk);
    checks++;
    if (ciphertext !== m_encrypt128(p2, k2)) begin failures++; $display("FAIL b2b ciphertext"); end
    n_b2b++;
    checks += 2;
    if (n_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
