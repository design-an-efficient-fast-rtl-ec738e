// led_pkg: types, constants and small functions shared by the LED cipher core.
//
// The 64-bit cipher state and the 64-bit key are each held as a 4x4 matrix of
// 4-bit nibbles. Nibble 0 is the most significant nibble of the 64-bit word and
// the matrix is filled row by row, so nibble r*4+c sits in row r, column c.
// The packed array state_t is declared [0:15] so that index 0 is the leftmost
// (most significant) nibble of the 64-bit value, matching that order.
//
// Constants here follow the LED cipher as published by its designers: the
// PRESENT S-box, the MixColumnsSerial matrix (the fourth power of a serial
// companion matrix over GF(2^4) with x^4+x+1) and the 6-bit round-constant LFSR.
// The default configuration is the 64-bit key: 32 rounds (8 steps of 4 rounds),
// key added before rounds 0, 4, ..., 28 and once after the last round. The
// 128-bit-key variant runs 12 steps (48 rounds) and alternates the two key
// halves; led_rounds() gives the round count for a key length.
package led_pkg;

  typedef logic [3:0]         nibble_t;
  typedef nibble_t [0:15]     state_t;   // [0] = most significant nibble

  localparam int unsigned LED_KEY_BITS    = 64;   // default key length
  localparam int unsigned ROUNDS_PER_STEP = 4;
  localparam int unsigned RC_W            = 6;

  typedef logic [RC_W-1:0]    rc_t;

  // Steps of four rounds: 8 for a 64-bit key, 12 for a longer key.
  function automatic int unsigned led_steps(int unsigned key_bits);
    return (key_bits > 64) ? 12 : 8;
  endfunction

  function automatic int unsigned led_rounds(int unsigned key_bits);
    return ROUNDS_PER_STEP * led_steps(key_bits);
  endfunction

  localparam int unsigned ROUNDS = led_rounds(LED_KEY_BITS);   // 32

  // MixColumnsSerial matrix, row-major: MDS[r*4+j] multiplies input row j into
  // output row r. These are the 16 "mix column constants".
  localparam nibble_t MDS [16] = '{
    4'h4, 4'h1, 4'h2, 4'h2,
    4'h8, 4'h6, 4'h5, 4'h6,
    4'hB, 4'hE, 4'hA, 4'h9,
    4'h2, 4'h2, 4'hF, 4'hB
  };

  // Multiplication in GF(2^4) modulo x^4 + x + 1.
  function automatic nibble_t gf16_mul(nibble_t a, nibble_t b);
    nibble_t p, aa;
    p  = '0;
    aa = a;
    for (int k = 0; k < 4; k++) begin
      if (b[k]) p = p ^ aa;
      aa = {aa[2:0], 1'b0} ^ (aa[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

  // Round constant for round i: the LED LFSR, started at zero and clocked
  // i+1 times. Each clock shifts left by one and feeds in rc5 ^ rc4 ^ 1.
  function automatic rc_t led_rc(int unsigned i);
    rc_t rc;
    rc = '0;
    for (int unsigned k = 0; k <= i; k++)
      rc = {rc[4:0], rc[5] ^ rc[4] ^ 1'b1};
    return rc;
  endfunction

endpackage
