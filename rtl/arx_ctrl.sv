// arx_ctrl: control unit of the 16-bit ARX engine (a Moore state machine).
//
// After ARX_Load the unit runs its states in a fixed order:
//   LOAD  4 cycles  write counter: word k of both input ports goes to buffer word k
//   BUFRD 3 cycles  read counter: read ports latched, adder level 1, adder level 2
//   ROT   1 cycle   rotators
//   XOR   1 cycle   XOR banks
//   ADDB  1 cycle   output adding bank
//   FIFO  1 cycle   Z0..Z3 stored in the 64-bit FIFO
//   OUT   4 cycles  ARX_flag high, FIFO word k on the 16-bit output bus in cycle k
// so execution takes seven cycles after the four load cycles, as the architecture states.
// The split into these named states and the 4-cycle output phase (the output bus being
// 16 bits wide) are this design's choices. The read-port addresses select, for adder n of
// each core, the three input words its T_n term of the *-operation adds; bit 1 of each
// adder control adds the constant as the fourth operand, so the address of each adder's
// fourth port is always 0 (those four bit pairs of ADDX/ADDY are constant). ARX_Load is
// ignored unless IDLE.
module arx_ctrl
  import pi16_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      arx_load,
  output core_ctl_t xctl,
  output core_ctl_t yctl,
  output logic      oac,
  output logic      fifoc,
  output logic [1:0] rd_ptr,
  output logic      arx_flag
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_BUFRD, S_ROT, S_XOR, S_ADDB, S_FIFO, S_OUT} state_t;

  // read-port address word: adder n reads words w0,w1,w2 on ports 4n..4n+2, port 4n+3 = 0
  function automatic logic [31:0] port_addrs(bit y);
    logic [31:0] a;
    logic [3:0][2:0][1:0] w;
    if (!y) w = '{'{2'd3, 2'd2, 2'd1}, '{2'd3, 2'd2, 2'd0}, '{2'd3, 2'd1, 2'd0}, '{2'd2, 2'd1, 2'd0}};
    else    w = '{'{2'd3, 2'd1, 2'd0}, '{2'd2, 2'd1, 2'd0}, '{2'd3, 2'd2, 2'd1}, '{2'd3, 2'd2, 2'd0}};
    a = '0;
    for (int n = 0; n < 4; n++)
      for (int k = 0; k < 3; k++) a[2*(4*n+k) +: 2] = w[n][k];
    return a;
  endfunction

  localparam logic [31:0] ADDX = port_addrs(1'b0);
  localparam logic [31:0] ADDY = port_addrs(1'b1);

  state_t     state;
  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  begin cnt <= '0; if (arx_load) state <= S_LOAD; end
        S_LOAD:  begin cnt <= cnt + 2'd1; if (cnt == 2'd3) begin state <= S_BUFRD; cnt <= '0; end end
        S_BUFRD: begin cnt <= cnt + 2'd1; if (cnt == 2'd2) begin state <= S_ROT; cnt <= '0; end end
        S_ROT:   state <= S_XOR;
        S_XOR:   state <= S_ADDB;
        S_ADDB:  state <= S_FIFO;
        S_FIFO:  begin state <= S_OUT; cnt <= '0; end
        S_OUT:   begin cnt <= cnt + 2'd1; if (cnt == 2'd3) begin state <= S_IDLE; cnt <= '0; end end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    xctl = '0;
    yctl = '0;
    xctl.wr_en   = (state == S_LOAD);
    xctl.wr_addr = cnt;
    yctl.wr_en   = (state == S_LOAD);
    yctl.wr_addr = cnt;
    if (state == S_BUFRD) begin
      xctl.addr = ADDX;
      yctl.addr = ADDY;
      xctl.actl = {4{2'b11}};
      yctl.actl = {4{2'b11}};
    end
    xctl.rc  = (state == S_ROT);
    yctl.rc  = (state == S_ROT);
    xctl.xc  = (state == S_XOR);
    yctl.xc  = (state == S_XOR);
    oac      = (state == S_ADDB);
    fifoc    = (state == S_FIFO);
    arx_flag = (state == S_OUT);
    rd_ptr   = cnt;
  end

endmodule
