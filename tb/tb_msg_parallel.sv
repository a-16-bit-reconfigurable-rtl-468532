// tb_msg_parallel: a 1600-byte message encrypted by 100 message processors side by side.
//
// The message is cut into 100 blocks of 128 bits. Processor p gets block p and counter value
// p + 1 in counter word 3. All processors share the key and PMN (automatic mode, PC 0000)
// and start in the same cycle, so they finish together. Each processor's eight ciphertext
// and eight tag words are compared with the reference model. The testbench also checks that
// every processor takes the same number of cycles from start to its first output word, and
// prints the bits encrypted per clock cycle of the whole array and the resulting throughput
// at a 250 MHz clock. Message, key and PMN words are random.
module tb_msg_parallel;
  import pi16_pkg::*;
  import pi16_ref_pkg::*;
  localparam int NP = 100, KW = 6, PW = 2;
  logic clk = 0, rst_n = 0, start = 0, key_pmn_valid = 0, msg_valid = 0;
  word_t key_pmn = 0;
  word_t message [NP];
  word_t cipher_txt [NP], tag [NP];
  logic [NP-1:0] tag_flag, busy;
  int checks = 0, failures = 0, cyc = 0;

  for (genvar p = 0; p < NP; p++) begin : g_proc
    msg_processor u_mp (.clk, .rst_n, .start, .pc(4'b0000), .key_pmn, .key_pmn_valid,
                        .message(message[p]), .msg_valid, .cipher_txt(cipher_txt[p]),
                        .tag(tag[p]), .tag_flag(tag_flag[p]), .busy(busy[p]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t kp [16];
    q4_t ctr [NP];
    logic [7:0][15:0] msg [NP];
    s16_t cis, st, r, t;
    s16_t e [NP];
    int c_start, lat;

    for (int i = 0; i < 16; i++) kp[i] = (i == KW + PW) ? 16'h8000 : 16'h0000;
    for (int i = 0; i < KW + PW; i++) kp[i] = word_t'($urandom);
    for (int p = 0; p < NP; p++) begin
      ctr[p] = '0;
      ctr[p][3] = word_t'(p + 1);
      for (int i = 0; i < 8; i++) msg[p][i] = word_t'($urandom);
      message[p] = '0;
    end

    // expected values: CIS is common, then one counter call and one message call per block
    for (int i = 0; i < 16; i++) st[i] = kp[i];
    cis = pi_perm(st);
    for (int p = 0; p < NP; p++) begin
      st = cis;
      for (int i = 0; i < 4; i++) st[i] ^= ctr[p][i];
      r = pi_perm(st);
      for (int i = 0; i < 8; i++) r[i] ^= msg[p][i];
      t = pi_perm(r);
      for (int i = 0; i < 8; i++) begin e[p][i] = r[i]; e[p][8 + i] = t[i]; end
    end

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    c_start = cyc;
    @(negedge clk);
    start = 0;
    fork
      begin
        @(negedge clk);   // key/PMN words are taken from the second cycle after start
        for (int i = 0; i < KW + PW; i++) begin
          key_pmn = kp[i]; key_pmn_valid = 1;
          @(negedge clk);
        end
        key_pmn_valid = 0;
      end
      begin
        for (int i = 0; i < 12; i++) begin
          for (int p = 0; p < NP; p++) message[p] = (i < 4) ? ctr[p][i] : msg[p][i - 4];
          msg_valid = 1;
          @(negedge clk);
        end
        msg_valid = 0;
      end
    join

    while (tag_flag == '0) @(negedge clk);
    lat = cyc - c_start;
    checks++;
    if (tag_flag != '1) begin failures++; $display("processors did not finish together: %h", tag_flag); end
    for (int i = 0; i < 8; i++) begin
      for (int p = 0; p < NP; p++) begin
        checks += 2;
        if (cipher_txt[p] !== e[p][i]) begin
          failures++; $display("proc %0d cipher %0d: got %h exp %h", p, i, cipher_txt[p], e[p][i]);
        end
        if (tag[p] !== e[p][8 + i]) begin
          failures++; $display("proc %0d tag %0d: got %h exp %h", p, i, tag[p], e[p][8 + i]);
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (tag_flag != '0) failures++;
    if (busy != '0) failures++;
    lat += 8;   // count the eight output cycles as well
    $display("%0d bytes in %0d cycles: %0d.%02d bits/cycle, %0d Mbit/s at 250 MHz",
             NP * 16, lat, NP * 128 / lat, (NP * 12800 / lat) % 100, NP * 128 * 250 / lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
