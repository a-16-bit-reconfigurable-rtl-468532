// arx_engine: the 16-bit ARX engine computing one *-operation Z = X * Y of pi-Cipher.
//
// X and Y are 4-tuples of 16-bit words. Two cores run in parallel, the X core on the mu
// transformation and the Y core on the nu transformation; four adders combine their XOR
// bank outputs and the 64-bit result is stored in a FIFO, from which it leaves one word per
// cycle on the 16-bit output bus.
//
// Timing (cycle 0 = ARX_Load high while the engine is idle):
//   cycles 1..4   inpx/inpy carry X_k and Y_k, k = 0..3 (sampled by the engine)
//   cycles 5..11  execution (three adder cycles, rotate, XOR, add bank, FIFO write)
//   cycles 12..15 arx_flag high, op carries Z0, Z1, Z2, Z3
// The engine is idle again at cycle 16 and accepts the next ARX_Load there.
module arx_engine
  import pi16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  arx_load,
  input  word_t inpx,
  input  word_t inpy,
  output word_t op,
  output logic  arx_flag
);

  core_ctl_t  xctl, yctl;
  logic       oac, fifoc;
  logic [1:0] rd_ptr;
  quad_t      xo, yo, z, fifo_q;

  arx_ctrl u_ctrl (.clk, .rst_n, .arx_load, .xctl, .yctl, .oac, .fifoc, .rd_ptr, .arx_flag);

  arx_core #(.DIR(1'b0)) u_xcore (.clk, .rst_n, .din(inpx), .ctl(xctl), .xo(xo));
  arx_core #(.DIR(1'b1)) u_ycore (.clk, .rst_n, .din(inpy), .ctl(yctl), .xo(yo));

  arx_add_bank u_addb (.clk, .rst_n, .en(oac), .x(xo), .y(yo), .z);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_q <= '0;
    else if (fifoc) fifo_q <= z;
  end

  assign op = fifo_q[rd_ptr];

endmodule
