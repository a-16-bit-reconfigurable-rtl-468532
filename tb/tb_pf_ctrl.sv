// tb_pf_ctrl: checks the pi-function control unit's schedule with a timing model of the ARX
// engine (ARX_flag for four cycles, 12 cycles after ARX_Load). For each of the 24
// operations it checks the X and Y chunk addresses fed (forward chain: C1 or J(i-1) with
// Ii; backward chain: Ji with C2 or J(i+1)) and the write-back addresses, and it checks
// the 16-word input and output phases and the Start-to-pi_Flag count of 417 cycles.
module tb_pf_ctrl;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, arx_flag = 0, arx_load, wrena, iosel, pi_flag;
  logic [5:0] addr_pa, addr_pb;
  logic [3:0] addr_po;
  logic [1:0] ioena;
  int checks = 0, failures = 0;
  int cyc = 0, load_cyc = -100;

  pf_ctrl dut (.clk, .rst_n, .start, .arx_flag, .arx_load, .addr_pa, .addr_pb, .addr_po,
               .wrena, .iosel, .ioena, .pi_flag);

  always #5 clk = ~clk;

  // ARX engine timing model
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (arx_load) load_cyc <= cyc;
    arx_flag <= (cyc + 1 - load_cyc >= 12) && (cyc + 1 - load_cyc <= 15) && load_cyc >= 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    int t0, ops;
    int xb, yb, wb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int call = 0; call < 2; call++) begin
      @(negedge clk);
      start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      for (int k = 0; k < 16; k++) begin
        chk(ioena == 2'b01 && wrena && !iosel && addr_pa == 6'(k), "input phase");
        @(negedge clk);
      end
      ops = 0;
      for (int r = 0; r < 3; r++) begin
        for (int j = 0; j < 8; j++) begin
          int i;
          if (j < 4) begin
            i = j;
            xb = (i == 0) ? 16 + 8 * r : 48 + 4 * (i - 1);
            yb = 4 * i;
            wb = 48 + 4 * i;
          end else begin
            i = 7 - j;
            xb = 48 + 4 * i;
            yb = (i == 3) ? 16 + 8 * r + 4 : 4 * (i + 1);
            wb = 4 * i;
          end
          chk(arx_load, "ARX_Load");
          @(negedge clk);
          for (int k = 0; k < 4; k++) begin
            chk(addr_pa == 6'(xb + k) && addr_pb == 6'(yb + k) && !wrena, $sformatf("feed r%0d op%0d", r, j));
            @(negedge clk);
          end
          while (!arx_flag) begin
            chk(!wrena && !arx_load, "idle while engine runs");
            @(negedge clk);
          end
          for (int k = 0; k < 4; k++) begin
            chk(wrena && iosel && addr_pa == 6'(wb + k), $sformatf("write-back r%0d op%0d", r, j));
            @(negedge clk);
          end
          ops++;
        end
      end
      for (int k = 0; k < 16; k++) begin
        chk(ioena == 2'b10 && addr_po == 4'(k) && !wrena, "output phase");
        @(negedge clk);
      end
      chk(pi_flag, "pi_Flag");
      chk(cyc - t0 == 417, $sformatf("Start to pi_Flag %0d cycles, expected 417", cyc - t0));
      chk(ops == 24, "24 operations");
      @(negedge clk);
      chk(!pi_flag, "pi_Flag one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
