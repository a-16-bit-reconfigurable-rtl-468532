// arx_core: one of the two parallel cores of the 16-bit ARX engine.
//
// The X core computes the mu half and the Y core the nu half of the *-operation. A core
// holds a 64-bit buffer (four 16-bit words) filled one word per cycle from its 16-bit input
// port. Sixteen read ports, each with a 2-bit word address taken from the 32-bit address
// word, feed four four-input adders (ports 4n..4n+3 go to adder n). The adder outputs are
// left-rotated by the core's rotation constants and mixed by the XOR bank. Everything is
// sequenced by the ARX control unit through the control word ctl (see pi16_pkg::core_ctl_t):
// three adder cycles, one rotator cycle and one XOR cycle after the buffer is filled.
module arx_core
  import pi16_pkg::*;
#(
  parameter bit    DIR = 1'b0,             // 0: X core (mu), 1: Y core (nu)
  parameter quad_t CST = star_consts(DIR), // const_1..4 or const_5..8
  parameter rot4_t ROT = DIR ? ROT_Y : ROT_X
) (
  input  logic      clk,
  input  logic      rst_n,
  input  word_t     din,   // Inpx-Bus / Inpy-Bus
  input  core_ctl_t ctl,
  output quad_t     xo     // X0..X3 / Y0..Y3 buses
);

  quad_t buf_q;                 // the 64-bit core buffer
  word_t [15:0] port;           // the sixteen read ports
  quad_t t, tr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_q <= '0;
    else if (ctl.wr_en) buf_q[ctl.wr_addr] <= din;
  end

  always_comb begin
    for (int j = 0; j < 16; j++) port[j] = buf_q[ctl.addr[2*j +: 2]];
  end

  for (genvar n = 0; n < 4; n++) begin : g_add
    arx_adder4 u_add (
      .clk, .rst_n,
      .en       (ctl.actl[n][0]),
      .const_sel(ctl.actl[n][1]),
      .p        ({port[4*n+3], port[4*n+2], port[4*n+1], port[4*n]}),
      .cst      (CST[n]),
      .sum      (t[n])
    );
  end

  arx_rotator #(.ROT(ROT)) u_rot (.clk, .rst_n, .en(ctl.rc), .t, .tr);

  arx_xor_bank #(.DIR(DIR)) u_xor (.clk, .rst_n, .en(ctl.xc), .tr, .xo);

endmodule
