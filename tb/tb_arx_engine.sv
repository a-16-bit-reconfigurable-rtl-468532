// tb_arx_engine: runs *-operations through the ARX engine, back to back, and compares Z with
// the reference model and with one vector computed outside the simulator
// ((1,2,3,4) * (5,6,7,8)). Checks the timing: ARX_flag rises 12 cycles after ARX_Load and
// stays high for exactly the four output words.
module tb_arx_engine;
  import pi16_pkg::*;
  import pi16_ref_pkg::*;
  logic clk = 0, rst_n = 0, arx_load = 0, arx_flag;
  word_t inpx, inpy, op;
  int checks = 0, failures = 0;

  arx_engine dut (.clk, .rst_n, .arx_load, .inpx, .inpy, .op, .arx_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q4_t x, y, z, e;
    int lat;
    inpx = '0; inpy = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      if (it == 0) begin
        x = {16'd4, 16'd3, 16'd2, 16'd1};
        y = {16'd8, 16'd7, 16'd6, 16'd5};
        e = {16'hBA28, 16'h7671, 16'hB61E, 16'hC299};
      end else begin
        for (int k = 0; k < 4; k++) begin x[k] = word_t'($urandom); y[k] = word_t'($urandom); end
        e = star(x, y);
      end
      @(negedge clk);
      arx_load = 1;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        arx_load = 0;
        inpx = x[k];
        inpy = y[k];
      end
      lat = 5;
      @(negedge clk);
      inpx = word_t'($urandom);   // inputs are don't-care now
      inpy = word_t'($urandom);
      while (!arx_flag && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 12) begin failures++; $display("latency %0d, expected 12", lat); end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (!arx_flag) failures++;
        z[k] = op;
        if (k < 3) @(negedge clk);
      end
      checks++;
      if (z !== e) begin failures++; $display("op %0d: got %h exp %h", it, z, e); end
      @(posedge clk);
      #1;
      checks++;
      if (arx_flag) begin failures++; $display("flag longer than 4 cycles"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
