// tb_arx_rotator: checks both rotator flavours (X: 1,4,9,11; Y: 2,5,7,13) against a
// shift-and-or rotation written here, and that en low holds the outputs.
module tb_arx_rotator;
  import pi16_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  quad_t t, trx, try_;
  int checks = 0, failures = 0;
  int rx [4] = '{1, 4, 9, 11};
  int ry [4] = '{2, 5, 7, 13};

  arx_rotator #(.ROT(ROT_X)) dutx (.clk, .rst_n, .en, .t, .tr(trx));
  arx_rotator #(.ROT(ROT_Y)) duty (.clk, .rst_n, .en, .t, .tr(try_));

  always #5 clk = ~clk;

  function automatic word_t rot(word_t v, int r);
    return word_t'((32'(v) << r) | (32'(v) >> (16 - r)));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) t[k] = (i == 0) ? word_t'(16'h0001 << k) : word_t'($urandom);
      en = 1;
      @(negedge clk);
      en = 0;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (trx[k] !== rot(t[k], rx[k])) begin failures++; $display("X lane %0d: %h -> %h", k, t[k], trx[k]); end
        if (try_[k] !== rot(t[k], ry[k])) begin failures++; $display("Y lane %0d: %h -> %h", k, t[k], try_[k]); end
      end
      t = ~t;
      @(negedge clk);
      checks++;
      if (trx[0] !== rot(~t[0], rx[0])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
