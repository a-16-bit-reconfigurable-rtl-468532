// tb_pf_buffer: checks the pi-function buffer: the round constants present after reset at
// words 16..39 (listed literally in the reference package), zeros elsewhere, writes from the
// input stream (IOSEL 0) and from the ARX engine (IOSEL 1) at ADDR_PA, no write with WRENA
// low, and the three read ports (PO reading the 16 state words) against a model array.
module tb_pf_buffer;
  import pi16_pkg::*;
  import pi16_ref_pkg::K;
  logic clk = 0, rst_n = 0, wrena = 0, iosel = 0;
  logic [5:0] addr_pa = 0, addr_pb = 0;
  logic [3:0] addr_po = 0;
  word_t istrm = 0, ae = 0, pa, pb, po;
  word_t model [64];
  int checks = 0, failures = 0;

  pf_buffer dut (.clk, .rst_n, .addr_pa, .addr_pb, .addr_po, .wrena, .iosel, .istrm, .ae, .pa, .pb, .po);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) model[a] = (a >= 16 && a < 40) ? K[8 + a - 16] : '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      addr_pa = 6'(a); addr_pb = 6'(63 - a);
      #1;
      chk(pa, model[a], "reset contents PA");
      chk(pb, model[63 - a], "reset contents PB");
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr_pa = 6'($urandom); addr_pb = 6'($urandom); addr_po = 4'($urandom);
      wrena = 1'($urandom); iosel = 1'($urandom);
      istrm = word_t'($urandom); ae = word_t'($urandom);
      #1;
      chk(pa, model[addr_pa], "PA");
      chk(pb, model[addr_pb], "PB");
      chk(po, model[6'(addr_po)], "PO");
      if (wrena) model[addr_pa] = iosel ? ae : istrm;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
