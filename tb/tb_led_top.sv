// tb_led_top: end-to-end test of the LED-64 core at its default size.
//
// Encrypts the two published LED-64 test vectors and a set of random blocks,
// comparing each ciphertext with the reference model in led_model_pkg and
// checking that done arrives exactly 32 cycles after start. It also exercises
// and counts each mechanism of the design: key additions (flag = 1 rounds),
// constant-only rounds (flag = 0), the final key addition, a start that is
// ignored while busy, back-to-back operation (start in the done cycle),
// inputs changing after capture, and a reset in the middle of an operation.
module tb_led_top;
  import led_model_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [63:0] plaintext = '0, key = '0, ciphertext;
  logic        busy, done;
  int checks = 0, failures = 0;
  int n_key_add = 0, n_plain_round = 0, n_final = 0, n_ignored = 0;
  int n_b2b = 0, n_capture = 0, n_reset = 0, n_ops = 0;

  led_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count rounds by kind from the port timing: the round computed on the
  // start edge is iteration 0, and each following busy cycle computes the
  // next iteration; iterations 0, 4, ..., 28 add the key. A done pulse marks
  // the final key addition.
  int iter_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (start && !busy) iter_seen = 0;
    if ((start && !busy) || busy) begin
      if (iter_seen % 4 == 0) n_key_add++; else n_plain_round++;
      iter_seen++;
    end
    if (done) n_final++;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Start one block and wait for done, counting cycles. With b2b, the next
  // start is raised in the done cycle by the caller.
  task automatic encrypt(logic [63:0] p, logic [63:0] k, logic [63:0] exp,
                         bit poke_busy, bit scramble);
    int cycles;
    @(negedge clk);
    plaintext = p; key = k; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    if (scramble) begin
      plaintext = ~p; key = ~k;
      n_capture++;
    end
    while (!done) begin
      if (poke_busy && cycles == 7) begin
        start = 1; plaintext = 64'hDEAD_BEEF_0000_0000; n_ignored++;
      end else start = 0;
      @(negedge clk);
      cycles++;
    end
    start = 0;
    checks++;
    if (cycles != 32) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 32", cycles);
    end
    check("ciphertext", ciphertext, exp);
    n_ops++;
  endtask

  logic [63:0] p, k, p2, k2;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt(64'h0, 64'h0, 64'h39C2_4010_03A0_C798, 0, 0);
    encrypt(64'h0123_4567_89AB_CDEF, 64'h0123_4567_89AB_CDEF, 64'hA003_551E_3893_FC58, 0, 0);
    check("model vector 1", m_encrypt(64'h0, 64'h0), 64'h39C2_4010_03A0_C798);
    for (int n = 0; n < 20; n++) begin
      p = {$urandom(), $urandom()};
      k = {$urandom(), $urandom()};
      encrypt(p, k, m_encrypt(p, k), n == 3, n == 5);
    end

    // Back-to-back: second start in the cycle where done is high.
    p = {$urandom(), $urandom()}; k = {$urandom(), $urandom()};
    p2 = {$urandom(), $urandom()}; k2 = {$urandom(), $urandom()};
    encrypt(p, k, m_encrypt(p, k), 0, 0);
    begin
      int cycles;
      plaintext = p2; key = k2; start = 1;   // done is high in this cycle
      @(negedge clk);
      start = 0; cycles = 1;
      checks++;
      if (!busy) begin failures++; $display("FAIL back-to-back start not taken"); end
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 32) begin failures++; $display("FAIL b2b latency %0d", cycles); end
      check("b2b ciphertext", ciphertext, m_encrypt(p2, k2));
      n_b2b++; n_ops++;
    end

    // Reset in the middle of an operation, then a clean operation.
    @(negedge clk);
    plaintext = p; key = k; start = 1;
    @(negedge clk); start = 0;
    repeat (9) @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    checks++;
    if (busy || done || ciphertext != 0) begin failures++; $display("FAIL reset state"); end
    rst_n = 1; n_reset++;
    encrypt(p2, k, m_encrypt(p2, k), 0, 0);

    checks++;
    if (n_key_add != 8 * (n_ops + 0) + 3) begin
      // the aborted operation computed rounds 0..9: three of them with the key
      failures++;
      $display("FAIL key additions %0d for %0d operations", n_key_add, n_ops);
    end
    $display("mechanisms: ops=%0d key_add_rounds=%0d plain_rounds=%0d final_key_adds=%0d ignored_starts=%0d back_to_back=%0d input_changes=%0d mid_op_resets=%0d",
             n_ops, n_key_add, n_plain_round, n_final, n_ignored, n_b2b, n_capture, n_reset);
    if (n_key_add == 0)     begin failures++; $display("FAIL no key addition seen"); end
    if (n_plain_round == 0) begin failures++; $display("FAIL no constant-only round seen"); end
    if (n_final == 0)       begin failures++; $display("FAIL no final key addition seen"); end
    if (n_ignored == 0)     begin failures++; $display("FAIL no start while busy"); end
    if (n_b2b == 0)         begin failures++; $display("FAIL no back-to-back operation"); end
    if (n_capture == 0)     begin failures++; $display("FAIL no input change after start"); end
    if (n_reset == 0)       begin failures++; $display("FAIL no mid-operation reset"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
