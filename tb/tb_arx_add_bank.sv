// tb_arx_add_bank: checks Z3 = X0+Y0, Z0 = X1+Y1, Z1 = X2+Y2, Z2 = X3+Y3 (mod 2^16).
module tb_arx_add_bank;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  quad_t x, y, z;
  int checks = 0, failures = 0;

  arx_add_bank dut (.clk, .rst_n, .en, .x, .y, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        x[k] = (i == 0) ? 16'hFFFF : word_t'($urandom);
        y[k] = (i == 0) ? 16'h0002 : word_t'($urandom);
      end
      en = 1;
      @(negedge clk);
      en = 0;
      checks += 4;
      if (z[3] !== word_t'(x[0] + y[0])) failures++;
      if (z[0] !== word_t'(x[1] + y[1])) failures++;
      if (z[1] !== word_t'(x[2] + y[2])) failures++;
      if (z[2] !== word_t'(x[3] + y[3])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
