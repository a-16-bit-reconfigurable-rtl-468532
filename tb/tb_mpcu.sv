// tb_mpcu: checks the message processor control unit against models of its neighbours: the
// KPIG and ALU raise their flags after random delays, and a pi-function model takes 16
// words after PF_start, later gives 16 output words and then PF_flag. Checks the key_gen
// chosen from PC, that nothing starts before both flags, DBSEL/ALU_mode/PF_start in each
// pi-function call, the cipher/tag buffer writes and addresses, and the eight Tag_flag cycles.
module tb_mpcu;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, kpmn_flag = 0, alu_flag = 0, pf_flag = 0, pf_take = 0, pf_valid = 0;
  logic [3:0] pc = 0;
  logic [2:0] key_gen;
  logic dbsel, pf_start, cipher_enable, tag_enable, tag_flag, busy;
  logic [1:0] alu_mode;
  logic [3:0] cipher_addr, tag_addr;
  int checks = 0, failures = 0;
  int pf_calls = 0, cwr = 0, twr = 0, tflag = 0;

  mpcu dut (.clk, .rst_n, .start, .pc, .kpmn_flag, .alu_flag, .pf_flag, .pf_take, .pf_valid,
            .key_gen, .dbsel, .alu_mode, .pf_start, .cipher_enable, .cipher_addr,
            .tag_enable, .tag_addr, .tag_flag, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  // pi-function model with the per-call expectations
  always begin
    @(negedge clk);
    while (pf_start) begin : call
      logic [1:0] exp_mode;
      exp_mode = pf_calls == 0 ? 2'b00 : pf_calls == 1 ? 2'b10 : 2'b11;
      chk(alu_mode == exp_mode && dbsel == (pf_calls != 0) && key_gen == 3'b111,
          $sformatf("call %0d: alu_mode %b dbsel %b key_gen %b", pf_calls, alu_mode, dbsel, key_gen));
      @(negedge clk);
      chk(!pf_start, "PF_start longer than one cycle");
      for (int i = 0; i < 16; i++) begin
        pf_take = 1;
        #1;
        if (pf_calls == 2) begin
          chk(cipher_enable == (i < 8), "cipher_enable");
          if (i < 8) begin chk(cipher_addr == 4'(i), "cipher_addr"); cwr++; end
        end else chk(!cipher_enable, "cipher_enable outside message call");
        @(negedge clk);
      end
      pf_take = 0;
      repeat ($urandom_range(20, 5)) @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        pf_valid = 1;
        #1;
        if (pf_calls == 2) begin
          chk(tag_enable == (i < 8), "tag_enable");
          if (i < 8) begin chk(tag_addr == 4'(i), "tag_addr"); twr++; end
        end else chk(!tag_enable, "tag_enable outside message call");
        @(negedge clk);
      end
      pf_valid = 0;
      pf_flag = 1;
      @(negedge clk);
      pf_flag = 0;
      pf_calls++;
    end
  end

  initial begin
    automatic logic [3:0] pcs [5] = '{4'b0000, 4'b0011, 4'b0111, 4'b1001, 4'b0100};
    automatic logic [2:0] kgs [5] = '{3'b110, 3'b011, 3'b110, 3'b001, 3'b100};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      @(negedge clk);
      chk(key_gen == 3'b000 && !busy, "INIT: key_gen 000, not busy");
      pc = pcs[run];
      start = 1;
      @(negedge clk);
      start = 0;
      pc = 4'($urandom);
      chk(key_gen == kgs[run], $sformatf("PC %b -> key_gen %b", pcs[run], key_gen));
      pf_calls = 0; cwr = 0; twr = 0; tflag = 0;
      fork
        begin repeat ($urandom_range(30, 1)) @(negedge clk); kpmn_flag = 1; end
        begin repeat ($urandom_range(30, 1)) @(negedge clk); alu_flag = 1; end
      join
      while (pf_calls == 0 && !pf_start) begin
        chk(kpmn_flag && alu_flag || !pf_start, "start before both flags");
        @(negedge clk);
      end
      kpmn_flag = 0; alu_flag = 0;
      while (!tag_flag) @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        chk(tag_flag && cipher_addr == 4'(i) && tag_addr == 4'(i) && !cipher_enable && !tag_enable,
            "output phase");
        tflag++;
        @(negedge clk);
      end
      chk(!tag_flag, "Tag_flag eight cycles");
      chk(pf_calls == 3 && cwr == 8 && twr == 8 && tflag == 8, "three calls, eight cipher and tag writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
