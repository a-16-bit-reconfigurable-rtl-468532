// tb_out_buffer: random writes and reads of the 16-byte buffer against a model, including
// the unused addresses 8..15 (writes dropped, reads zero).
module tb_out_buffer;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] addr = 0;
  word_t din = 0, dout;
  word_t model [8];
  int checks = 0, failures = 0;

  out_buffer dut (.clk, .rst_n, .en, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1'($urandom); addr = 4'($urandom); din = word_t'($urandom);
      #1;
      checks++;
      if (dout !== (addr < 8 ? model[addr[2:0]] : 16'h0000)) begin
        failures++; $display("addr %0d: got %h", addr, dout);
      end
      if (en && addr < 8) model[addr[2:0]] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
