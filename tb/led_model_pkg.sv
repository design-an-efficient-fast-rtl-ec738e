// led_model_pkg: an untimed reference model of LED-64 for the testbenches.
//
// Written independently of the RTL: it works on plain 64-bit words (nibble n
// is bits 63-4n down to 60-4n), applies MixColumnsSerial as four passes of
// the serial matrix A (last row 4 1 2 2) built only from doubling in GF(2^4),
// rotates rows one cell at a time, and takes the round constants from the
// published list instead of an LFSR.
package led_model_pkg;

  localparam logic [63:0] SBOX_STR = 64'hC56B90AD3EF84712;  // S(0) leftmost

  localparam logic [5:0] RC_LIST [48] = '{
    6'h01, 6'h03, 6'h07, 6'h0F, 6'h1F, 6'h3E, 6'h3D, 6'h3B,
    6'h37, 6'h2F, 6'h1E, 6'h3C, 6'h39, 6'h33, 6'h27, 6'h0E,
    6'h1D, 6'h3A, 6'h35, 6'h2B, 6'h16, 6'h2C, 6'h18, 6'h30,
    6'h21, 6'h02, 6'h05, 6'h0B, 6'h17, 6'h2E, 6'h1C, 6'h38,
    6'h31, 6'h23, 6'h06, 6'h0D, 6'h1B, 6'h36, 6'h2D, 6'h1A,
    6'h34, 6'h29, 6'h12, 6'h24, 6'h08, 6'h11, 6'h22, 6'h04
  };

  function automatic logic [3:0] get_n(logic [63:0] w, int n);
    return w[63 - 4*n -: 4];
  endfunction

  function automatic logic [63:0] set_n(logic [63:0] w, int n, logic [3:0] v);
    logic [63:0] r;
    r = w;
    r[63 - 4*n -: 4] = v;
    return r;
  endfunction

  function automatic logic [3:0] m_sbox(logic [3:0] x);
    return SBOX_STR[63 - 4*x -: 4];
  endfunction

  function automatic logic [3:0] xtime(logic [3:0] a);
    return a[3] ? ({a[2:0], 1'b0} ^ 4'b0011) : {a[2:0], 1'b0};
  endfunction

  function automatic logic [63:0] m_subcells(logic [63:0] w);
    logic [63:0] r;
    for (int n = 0; n < 16; n++) r = set_n(r, n, m_sbox(get_n(w, n)));
    return r;
  endfunction

  function automatic logic [63:0] m_shiftrows(logic [63:0] w);
    logic [63:0] r;
    logic [3:0]  t;
    r = w;
    for (int row = 1; row < 4; row++)
      for (int k = 0; k < row; k++) begin
        t = get_n(r, row*4);
        for (int c = 0; c < 3; c++) r = set_n(r, row*4 + c, get_n(r, row*4 + c + 1));
        r = set_n(r, row*4 + 3, t);
      end
    return r;
  endfunction

  // One pass of the serial matrix A on every column.
  function automatic logic [63:0] m_serial_pass(logic [63:0] w);
    logic [63:0] r;
    logic [3:0]  a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_n(w, c); a1 = get_n(w, 4 + c); a2 = get_n(w, 8 + c); a3 = get_n(w, 12 + c);
      r = set_n(r, c,      a1);
      r = set_n(r, 4 + c,  a2);
      r = set_n(r, 8 + c,  a3);
      r = set_n(r, 12 + c, xtime(xtime(a0)) ^ a1 ^ xtime(a2) ^ xtime(a3));
    end
    return r;
  endfunction

  function automatic logic [63:0] m_mixcolumns(logic [63:0] w);
    logic [63:0] r;
    r = w;
    for (int k = 0; k < 4; k++) r = m_serial_pass(r);
    return r;
  endfunction

  function automatic logic [63:0] m_addconst(logic [63:0] w, logic [5:0] rc,
                                             bit long_key = 0);
    // key length 64 = 0x40: column 0 constants 4, 5, 2, 3
    // key length 128 = 0x80: column 0 constants 8, 9, 2, 3
    logic [63:0] c;
    c = long_key ? 64'h8000_9000_2000_3000 : 64'h4000_5000_2000_3000;
    c[59:56] = {1'b0, rc[5:3]};
    c[43:40] = {1'b0, rc[2:0]};
    c[27:24] = {1'b0, rc[5:3]};
    c[11:8]  = {1'b0, rc[2:0]};
    return w ^ c;
  endfunction

  function automatic logic [63:0] m_round(logic [63:0] w, logic [63:0] key, int i,
                                          bit long_key = 0);
    logic [63:0] r;
    r = (i % 4 == 0) ? (w ^ key) : w;
    r = m_addconst(r, RC_LIST[i], long_key);
    r = m_subcells(r);
    r = m_shiftrows(r);
    return m_mixcolumns(r);
  endfunction

  function automatic logic [63:0] m_encrypt(logic [63:0] p, logic [63:0] key);
    logic [63:0] s;
    s = p;
    for (int i = 0; i < 32; i++) s = m_round(s, key, i);
    return s ^ key;
  endfunction

  // 128-bit key: 48 rounds; K1 = key[127:64] on even steps, K2 on odd steps.
  function automatic logic [63:0] m_encrypt128(logic [63:0] p, logic [127:0] key);
    logic [63:0] s;
    s = p;
    for (int i = 0; i < 48; i++)
      s = m_round(s, ((i / 4) % 2 == 0) ? key[127:64] : key[63:0], i, 1);
    return s ^ key[127:64];
  endfunction

endpackage
