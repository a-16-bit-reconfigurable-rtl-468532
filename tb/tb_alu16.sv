// tb_alu16: loads counter and message (with gaps), checks ALU_flag, feeds 16 pi-function
// result words, and reads the output stream in each ALU_mode: pass (00, 01), counter xored
// into words 0..3 (10) and message xored into words 0..7 (11). Returning to mode 00 must
// empty the message buffer (ALU_flag low) for the next block.
module tb_alu16;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, msg_valid = 0, pf_valid = 0, rd = 0, alu_flag;
  logic [1:0] alu_mode = 0;
  word_t message = 0, pf_db = 0, alu_db;
  word_t m [12], r [16];
  int checks = 0, failures = 0;

  alu16 dut (.clk, .rst_n, .alu_mode, .message, .msg_valid, .pf_db, .pf_valid, .rd, .alu_db, .alu_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%s", what); end
  endtask

  initial begin
    word_t e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 5; blk++) begin
      @(negedge clk);
      alu_mode = 2'b00;
      @(negedge clk);
      chk(!alu_flag, "flag low after mode 00");
      for (int i = 0; i < 12; i++) begin
        while ($urandom_range(1) == 0) @(negedge clk);
        m[i] = word_t'($urandom);
        message = m[i]; msg_valid = 1;
        @(negedge clk);
        msg_valid = 0;
        if (i < 11) chk(!alu_flag, "flag early");
      end
      chk(alu_flag, "ALU_flag after 12 words");
      for (int i = 0; i < 16; i++) begin
        r[i] = word_t'($urandom);
        pf_db = r[i]; pf_valid = 1;
        @(negedge clk);
      end
      pf_valid = 0;
      for (int md = 0; md < 4; md++) begin
        alu_mode = 2'(md == 0 ? 1 : md == 1 ? 2 : md == 2 ? 3 : 0);
        @(negedge clk);
        for (int i = 0; i < 16; i++) begin
          e = r[i];
          if (alu_mode == 2'b10 && i < 4) e = r[i] ^ m[i];
          if (alu_mode == 2'b11 && i < 8) e = r[i] ^ m[4 + i];
          chk(alu_db === e, $sformatf("mode %b word %0d: got %h exp %h", alu_mode, i, alu_db, e));
          rd = 1;
          @(negedge clk);
          rd = 0;
          if ($urandom_range(1) == 0) @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
