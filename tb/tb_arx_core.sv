// tb_arx_core: drives the X and Y cores with hand-made control words (buffer write, the
// read-port addresses of the *-operation, three adder cycles, rotate, XOR) and compares
// their outputs with T4..T7 and T8..T11 computed here from the algorithm. A second pass uses
// the cores generically (no constant, every port reading word 3).
module tb_arx_core;
  import pi16_pkg::*;
  import pi16_ref_pkg::rl;
  import pi16_ref_pkg::K;
  logic clk = 0, rst_n = 0;
  word_t dx, dy;
  core_ctl_t cx, cy;
  quad_t xo, yo;
  int checks = 0, failures = 0;

  arx_core #(.DIR(1'b0)) dutx (.clk, .rst_n, .din(dx), .ctl(cx), .xo(xo));
  arx_core #(.DIR(1'b1)) duty (.clk, .rst_n, .din(dy), .ctl(cy), .xo(yo));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // address word: adder n reads words a[n][0..2] on ports 4n..4n+2, port 4n+3 reads a3
  function automatic logic [31:0] addrs(int a [4][3], int a3);
    logic [31:0] r;
    for (int n = 0; n < 4; n++) begin
      for (int k = 0; k < 3; k++) r[2*(4*n+k) +: 2] = 2'(a[n][k]);
      r[2*(4*n+3) +: 2] = 2'(a3);
    end
    return r;
  endfunction

  task automatic run(quad_t x, quad_t y, logic [31:0] ax, logic [31:0] ay, logic csel);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      cx = '0; cy = '0;
      cx.wr_en = 1; cx.wr_addr = 2'(k); dx = x[k];
      cy.wr_en = 1; cy.wr_addr = 2'(k); dy = y[k];
    end
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      cx = '0; cy = '0;
      cx.addr = ax; cy.addr = ay;
      cx.actl = {4{csel, 1'b1}};
      cy.actl = {4{csel, 1'b1}};
    end
    @(negedge clk); cx = '0; cy = '0; cx.rc = 1; cy.rc = 1;
    @(negedge clk); cx = '0; cy = '0; cx.xc = 1; cy.xc = 1;
    @(negedge clk); cx = '0; cy = '0;
  endtask

  int AX [4][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}, '{1, 2, 3}};
  int AY [4][3] = '{'{0, 2, 3}, '{1, 2, 3}, '{0, 1, 2}, '{0, 1, 3}};
  int A3 [4][3] = '{'{3, 3, 3}, '{3, 3, 3}, '{3, 3, 3}, '{3, 3, 3}};

  initial begin
    quad_t x, y, ex, ey;
    logic [15:0] t [4];
    cx = '0; cy = '0; dx = '0; dy = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      for (int k = 0; k < 4; k++) begin x[k] = word_t'($urandom); y[k] = word_t'($urandom); end
      if (it < 40) begin
        run(x, y, addrs(AX, 0), addrs(AY, 0), 1'b1);
        t[0] = rl(K[0] + x[0] + x[1] + x[2], 1);
        t[1] = rl(K[1] + x[0] + x[1] + x[3], 4);
        t[2] = rl(K[2] + x[0] + x[2] + x[3], 9);
        t[3] = rl(K[3] + x[1] + x[2] + x[3], 11);
        ex = {t[0] ^ t[2] ^ t[3], t[1] ^ t[2] ^ t[3], t[0] ^ t[1] ^ t[2], t[0] ^ t[1] ^ t[3]};
        t[0] = rl(K[4] + y[0] + y[2] + y[3], 2);
        t[1] = rl(K[5] + y[1] + y[2] + y[3], 5);
        t[2] = rl(K[6] + y[0] + y[1] + y[2], 7);
        t[3] = rl(K[7] + y[0] + y[1] + y[3], 13);
        ey = {t[0] ^ t[1] ^ t[2], t[0] ^ t[1] ^ t[3], t[0] ^ t[2] ^ t[3], t[1] ^ t[2] ^ t[3]};
      end else begin
        run(x, y, addrs(A3, 3), addrs(A3, 3), 1'b0);
        for (int n = 0; n < 4; n++) t[n] = 16'(4 * x[3]);
        t[0] = rl(t[0], 1); t[1] = rl(t[1], 4); t[2] = rl(t[2], 9); t[3] = rl(t[3], 11);
        ex = {t[0] ^ t[2] ^ t[3], t[1] ^ t[2] ^ t[3], t[0] ^ t[1] ^ t[2], t[0] ^ t[1] ^ t[3]};
        for (int n = 0; n < 4; n++) t[n] = 16'(4 * y[3]);
        t[0] = rl(t[0], 2); t[1] = rl(t[1], 5); t[2] = rl(t[2], 7); t[3] = rl(t[3], 13);
        ey = {t[0] ^ t[1] ^ t[2], t[0] ^ t[1] ^ t[3], t[0] ^ t[2] ^ t[3], t[1] ^ t[2] ^ t[3]};
      end
      checks += 2;
      if (xo !== ex) begin failures++; $display("X core %0d: got %h exp %h", it, xo, ex); end
      if (yo !== ey) begin failures++; $display("Y core %0d: got %h exp %h", it, yo, ey); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
