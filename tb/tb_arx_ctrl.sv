// tb_arx_ctrl: checks the control unit's cycle-by-cycle schedule after ARX_Load: four
// buffer-write cycles with write addresses 0..3, three adder cycles with the *-operation's
// read addresses and constant select, then rotate, XOR, add bank, FIFO write, and four
// cycles of ARX_flag with FIFO read pointer 0..3; ARX_Load during a run is ignored.
module tb_arx_ctrl;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, arx_load = 0;
  core_ctl_t xctl, yctl;
  logic oac, fifoc, arx_flag;
  logic [1:0] rd_ptr;
  int checks = 0, failures = 0;

  arx_ctrl dut (.clk, .rst_n, .arx_load, .xctl, .yctl, .oac, .fifoc, .rd_ptr, .arx_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected read addresses, from the operand lists of T0..T3 (port 4n+3 reads word 0)
  function automatic logic [31:0] exp_addr(bit y);
    int ax [4][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}, '{1, 2, 3}};
    int ay [4][3] = '{'{0, 2, 3}, '{1, 2, 3}, '{0, 1, 2}, '{0, 1, 3}};
    logic [31:0] r = '0;
    for (int n = 0; n < 4; n++)
      for (int k = 0; k < 3; k++) r[2*(4*n+k) +: 2] = 2'(y ? ay[n][k] : ax[n][k]);
    return r;
  endfunction

  task automatic chk(bit cond, string what, int cyc);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      arx_load = 1;
      @(negedge clk);
      arx_load = (run == 1);   // a load during the run must be ignored
      for (int c = 1; c <= 15; c++) begin
        if (c > 1) arx_load = 0;
        chk(xctl.wr_en == (c <= 4) && yctl.wr_en == (c <= 4), "wr_en", c);
        if (c <= 4) chk(xctl.wr_addr == 2'(c - 1) && yctl.wr_addr == 2'(c - 1), "wr_addr", c);
        chk((xctl.actl == {4{2'b11}}) == (c >= 5 && c <= 7), "adder control", c);
        if (c >= 5 && c <= 7) chk(xctl.addr == exp_addr(0) && yctl.addr == exp_addr(1), "read addresses", c);
        chk(xctl.rc == (c == 8) && yctl.rc == (c == 8), "rotator enable", c);
        chk(xctl.xc == (c == 9) && yctl.xc == (c == 9), "xor enable", c);
        chk(oac == (c == 10), "OAC", c);
        chk(fifoc == (c == 11), "FIFOC", c);
        chk(arx_flag == (c >= 12), "ARX_flag", c);
        if (c >= 12) chk(rd_ptr == 2'(c - 12), "FIFO read pointer", c);
        @(negedge clk);
      end
      chk(!arx_flag && !xctl.wr_en, "idle after run", 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
