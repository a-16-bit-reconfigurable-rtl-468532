// tb_pi_function: runs whole pi-function calls (three rounds, 24 *-operations on the ARX
// engine) and compares the 256-bit result with the reference model and, for the first call,
// with a result computed outside the simulator. Checks the input handshake (16 words taken
// right after Start), 16 valid output words and 417 cycles from Start to pi_Flag.
module tb_pi_function;
  import pi16_pkg::*;
  import pi16_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_take, po_valid, pi_flag;
  word_t istrm, po;
  int checks = 0, failures = 0, cyc = 0;
  s16_t st, got, e;
  int icnt, ocnt;

  pi_function dut (.clk, .rst_n, .start, .istrm, .in_take, .po, .po_valid, .pi_flag);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // source: presents word icnt, advances on in_take; sink collects po words
  assign istrm = st[icnt[3:0]];
  always @(posedge clk) begin
    if (in_take) icnt <= icnt + 1;
    if (po_valid) begin got[ocnt[3:0]] <= po; ocnt <= ocnt + 1; end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    icnt = 0; ocnt = 0; st = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int call = 0; call < 20; call++) begin
      if (call == 0) begin
        for (int i = 0; i < 16; i++) st[i] = 16'(16'h1111 * i);
        e = {16'h6CFF, 16'hBD40, 16'hAC2C, 16'hD1AA, 16'hBA39, 16'hFCDA, 16'hECF8, 16'hAA6D,
             16'hAF99, 16'h066A, 16'h140E, 16'h7C33, 16'h8059, 16'hE853, 16'h932D, 16'h2141};
      end else begin
        for (int i = 0; i < 16; i++) st[i] = word_t'($urandom);
        e = pi_perm(st);
      end
      @(negedge clk);
      icnt = 0; ocnt = 0;
      start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!pi_flag) @(negedge clk);
      checks += 3;
      if (icnt != 16) begin failures++; $display("took %0d input words", icnt); end
      if (ocnt != 16) begin failures++; $display("gave %0d output words", ocnt); end
      if (cyc - t0 != 417) begin failures++; $display("%0d cycles, expected 417", cyc - t0); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (got[i] !== e[i]) begin failures++; $display("call %0d word %0d: got %h exp %h", call, i, got[i], e[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
