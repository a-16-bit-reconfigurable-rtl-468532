// tb_arx_adder4: checks the four-input adder against p0+p1+p2+(cst or p3) mod 2^16,
// with a new operand set every cycle (three-cycle pipeline latency) and with en low
// (outputs must hold).
module tb_arx_adder4;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, const_sel = 0;
  quad_t p;
  word_t cst, sum;
  int checks = 0, failures = 0;
  word_t expq [$];

  arx_adder4 dut (.clk, .rst_n, .en, .const_sel, .p, .cst, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = '0; cst = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1;
      for (int k = 0; k < 4; k++) p[k] = word_t'($urandom);
      cst = word_t'($urandom);
      const_sel = 1'($urandom);
      expq.push_back(p[0] + p[1] + p[2] + (const_sel ? cst : p[3]));
      if (i >= 3) begin
        checks++;
        if (sum !== expq.pop_front()) begin
          failures++;
          $display("mismatch at %0d: got %h", i, sum);
        end
      end
    end
    // hold with en low
    @(negedge clk);
    en = 0;
    begin
      word_t held;
      held = sum;
      repeat (3) @(negedge clk);
      checks++;
      if (sum !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
