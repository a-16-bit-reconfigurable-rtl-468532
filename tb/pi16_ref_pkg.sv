// pi16_ref_pkg: reference model of the 16-bit pi-Cipher datapath for the testbenches.
//
// Written straight from the algorithm (the * operation step by step, a round as a forward
// and a backward chain of * operations, three rounds, and the message processor's flow),
// independently of the RTL structure. The constant words are listed literally here: the
// 16-bit words built from the weight-4 bytes F0,E8,E4,... in decreasing order.
package pi16_ref_pkg;

  typedef logic [3:0][15:0]  q4_t;   // [i] = word i
  typedef logic [15:0][15:0] s16_t;  // [i] = word i of the 256-bit state

  localparam logic [15:0] K [32] = '{
    16'hF0E8, 16'hE4E2, 16'hE1D8, 16'hD4D2, 16'hD1CC, 16'hCAC9, 16'hC6C5, 16'hC3B8,
    16'hB4B2, 16'hB1AC, 16'hAAA9, 16'hA6A5, 16'hA39C, 16'h9A99, 16'h9695, 16'h938E,
    16'h8D8B, 16'h8778, 16'h7472, 16'h716C, 16'h6A69, 16'h6665, 16'h635C, 16'h5A59,
    16'h5655, 16'h534E, 16'h4D4B, 16'h473C, 16'h3A39, 16'h3635, 16'h332E, 16'h2D2B};

  function automatic logic [15:0] rl(logic [15:0] v, int r);
    logic [31:0] d;
    d = {v, v};
    return d[31-r -: 16];
  endfunction

  function automatic q4_t star(q4_t x, q4_t y);
    logic [15:0] t0, t1, t2, t3, t4, t5, t6, t7, t8, t9, t10, t11;
    q4_t z;
    t0 = rl(K[0] + x[0] + x[1] + x[2], 1);
    t1 = rl(K[1] + x[0] + x[1] + x[3], 4);
    t2 = rl(K[2] + x[0] + x[2] + x[3], 9);
    t3 = rl(K[3] + x[1] + x[2] + x[3], 11);
    t4 = t0 ^ t1 ^ t3;
    t5 = t0 ^ t1 ^ t2;
    t6 = t1 ^ t2 ^ t3;
    t7 = t0 ^ t2 ^ t3;
    t0 = rl(K[4] + y[0] + y[2] + y[3], 2);
    t1 = rl(K[5] + y[1] + y[2] + y[3], 5);
    t2 = rl(K[6] + y[0] + y[1] + y[2], 7);
    t3 = rl(K[7] + y[0] + y[1] + y[3], 13);
    t8  = t1 ^ t2 ^ t3;
    t9  = t0 ^ t2 ^ t3;
    t10 = t0 ^ t1 ^ t3;
    t11 = t0 ^ t1 ^ t2;
    z[3] = t4 + t8;
    z[0] = t5 + t9;
    z[1] = t6 + t10;
    z[2] = t7 + t11;
    return z;
  endfunction

  function automatic q4_t rconst(int k);
    q4_t c;
    for (int w = 0; w < 4; w++) c[w] = K[8 + 4 * k + w];
    return c;
  endfunction

  function automatic s16_t pi_perm(s16_t s);
    q4_t I [4];
    q4_t J [4];
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 4; i++) I[i] = s[4*i +: 4];
      J[0] = star(rconst(2 * r), I[0]);
      for (int i = 1; i < 4; i++) J[i] = star(J[i-1], I[i]);
      J[3] = star(J[3], rconst(2 * r + 1));
      for (int i = 2; i >= 0; i--) J[i] = star(J[i], J[i+1]);
      for (int i = 0; i < 4; i++) s[4*i +: 4] = J[i];
    end
    return s;
  endfunction

  // message processor: one 128-bit block, IS = 0 after INIT
  function automatic void encrypt(input logic [15:0] key [], input logic [15:0] pmn [],
                                  input logic [3:0][15:0] ctr, input logic [7:0][15:0] msg,
                                  output logic [7:0][15:0] c, output logic [7:0][15:0] tag);
    s16_t st, cis, r, d, t;
    int n;
    st = '0;
    n = 0;
    foreach (key[i]) begin st[n] = key[i]; n++; end
    foreach (pmn[i]) begin st[n] = pmn[i]; n++; end
    st[n] = 16'h8000;
    cis = pi_perm(st);
    d = cis;
    for (int i = 0; i < 4; i++) d[i] = cis[i] ^ ctr[i];
    r = pi_perm(d);
    d = r;
    for (int i = 0; i < 8; i++) d[i] = r[i] ^ msg[i];
    t = pi_perm(d);
    for (int i = 0; i < 8; i++) begin
      c[i]   = d[i];
      tag[i] = t[i];
    end
  endfunction

endpackage
