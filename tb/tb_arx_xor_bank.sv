// tb_arx_xor_bank: checks the X and Y XOR banks against the T4..T7 / T8..T11 equations.
module tb_arx_xor_bank;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  quad_t tr, xo, yo, ex, ey;
  int checks = 0, failures = 0;

  arx_xor_bank #(.DIR(1'b0)) dutx (.clk, .rst_n, .en, .tr, .xo(xo));
  arx_xor_bank #(.DIR(1'b1)) duty (.clk, .rst_n, .en, .tr, .xo(yo));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) tr[k] = word_t'($urandom);
      en = 1;
      ex[0] = tr[0] ^ tr[1] ^ tr[3];  // T4
      ex[1] = tr[0] ^ tr[1] ^ tr[2];  // T5
      ex[2] = tr[1] ^ tr[2] ^ tr[3];  // T6
      ex[3] = tr[0] ^ tr[2] ^ tr[3];  // T7
      ey[0] = tr[1] ^ tr[2] ^ tr[3];  // T8
      ey[1] = tr[0] ^ tr[2] ^ tr[3];  // T9
      ey[2] = tr[0] ^ tr[1] ^ tr[3];  // T10
      ey[3] = tr[0] ^ tr[1] ^ tr[2];  // T11
      @(negedge clk);
      en = 0;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (xo[k] !== ex[k]) begin failures++; $display("X%0d got %h exp %h", k, xo[k], ex[k]); end
        if (yo[k] !== ey[k]) begin failures++; $display("Y%0d got %h exp %h", k, yo[k], ey[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
