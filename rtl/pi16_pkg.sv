// pi16_pkg: shared types and constants of the 16-bit pi-Cipher encryption processor.
//
// The word is 16 bits; a chunk (one input of the * operation) is a 4-tuple of words.
// The rotation amounts of the two transformations follow the algorithmic description of
// the * operation (mu side 1,4,9,11; nu side 2,5,7,13). The numeric values of the eight
// *-operation constants and of the six 64-bit round constants are not part of the
// architecture description this RTL follows; this design generates them the way the
// pi-Cipher family builds them: the bytes whose Hamming weight is 4, in decreasing order
// (F0, E8, E4, E2, E1, D8, ...), paired into 16-bit words. Word 0..7 are const_1..const_8,
// words 8..31 the round constants C1,C2 of rounds 1..3 (4 words each).
package pi16_pkg;

  typedef logic [15:0] word_t;
  typedef word_t [3:0] quad_t;      // element [i] is word i of the 4-tuple

  // Layout of the 64-word pi-function buffer (this design's choice)
  localparam int unsigned PF_DEPTH     = 64;
  localparam int unsigned PF_STATE_BASE = 0;   // 16 words: input, round outputs, result
  localparam int unsigned PF_RC_BASE    = 16;  // 24 words: round constants (6 x 4)
  localparam int unsigned PF_TMP_BASE   = 48;  // 16 words: forward-chain intermediates
  localparam int unsigned N_ROUNDS      = 3;

  // The first 64 bytes of weight 4, counting down from 8'hFF (one pass over all bytes)
  typedef logic [63:0][7:0] hw4_tab_t;
  function automatic hw4_tab_t hw4_table();
    hw4_tab_t t;
    int unsigned k;
    t = '0;
    k = 0;
    for (int v = 255; v >= 0; v--) begin
      if ($countones(8'(v)) == 4 && k < 64) begin
        t[k] = 8'(v);
        k++;
      end
    end
    return t;
  endfunction

  localparam hw4_tab_t HW4 = hw4_table();

  function automatic word_t pi_const(int unsigned n);
    return {HW4[2 * n], HW4[2 * n + 1]};
  endfunction

  // const_1..const_4 (mu) and const_5..const_8 (nu)
  function automatic quad_t star_consts(bit y_side);
    quad_t q;
    for (int i = 0; i < 4; i++) q[i] = pi_const((y_side ? 4 : 0) + i);
    return q;
  endfunction

  // word w of round constant k (k = 2*round for C1, 2*round+1 for C2)
  function automatic word_t round_const(int unsigned k, int unsigned w);
    return pi_const(8 + 4 * k + w);
  endfunction

  typedef logic [3:0] rot_t;
  typedef rot_t [3:0] rot4_t;
  localparam rot4_t ROT_X = '{4'd11, 4'd9, 4'd4, 4'd1};   // [0]=1 [1]=4 [2]=9 [3]=11
  localparam rot4_t ROT_Y = '{4'd13, 4'd7, 4'd5, 4'd2};   // [0]=2 [1]=5 [2]=7 [3]=13

  // Control word of one ARX core, driven by the ARX control unit
  typedef struct packed {
    logic        wr_en;    // write the input-port word into the 64-bit buffer
    logic [1:0]  wr_addr;  // buffer word written
    logic [31:0] addr;     // ADDX/ADDY: 16 read ports x 2-bit word address
    logic [3:0][1:0] actl; // XA0C..XA3C: bit0 pipeline enable, bit1 constant select
    logic        rc;       // XRC/YRC: rotator register enable
    logic        xc;       // XXC/XYC: XOR bank register enable
  } core_ctl_t;

  function automatic word_t rotl16(word_t v, rot_t r);
    return (v << r) | (v >> (5'd16 - 5'(r)));
  endfunction

endpackage
