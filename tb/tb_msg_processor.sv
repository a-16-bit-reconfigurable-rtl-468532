// tb_msg_processor: end-to-end test of the message processor at its default parameters.
//
// Each run starts the processor with a PC value, supplies key/PMN (and IS words for the
// modes that store IS) on key_pmn and counter + message on message, both with random gaps,
// then collects the eight ciphertext and eight tag words while tag_flag is high. Expected
// values come from the reference model (three pi-function calls: initialisation, counter,
// message). The first run uses a vector computed outside the simulator. Also checked: the
// cycle count from the last input word to the first output word (1256) and busy. Counted
// mechanisms, each of which must occur: automatic mode, manual KPIG modes, an IS loaded by
// the user, input stalls, the three kinds of pi-function call (KPIG source, ALU counter
// mode, ALU message mode), the CIS copy into the KPIG's IS buffer, and the output phase.
module tb_msg_processor;
  import pi16_pkg::*;
  import pi16_ref_pkg::*;
  localparam int KW = 6, PW = 2;
  logic clk = 0, rst_n = 0, start = 0, key_pmn_valid = 0, msg_valid = 0, tag_flag, busy;
  logic [3:0] pc = 0;
  word_t key_pmn = 0, message = 0, cipher_txt, tag;
  int checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int n_auto = 0, n_manual = 0, n_user_is = 0, n_stall = 0, n_pf_kpig = 0, n_pf_ctr = 0,
      n_pf_msg = 0, n_is_copy = 0, n_out = 0;

  msg_processor dut (.clk, .rst_n, .start, .pc, .key_pmn, .key_pmn_valid, .message, .msg_valid,
                     .cipher_txt, .tag, .tag_flag, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // observe the pi-function calls and the KPIG's IS capture
  always @(posedge clk) begin
    if (dut.pf_start) begin
      if (!dut.dbsel) n_pf_kpig++;
      else if (dut.alu_mode == 2'b10) n_pf_ctr++;
      else if (dut.alu_mode == 2'b11) n_pf_msg++;
    end
    if (dut.pf_valid && dut.key_gen == 3'b111 && !dut.dbsel) n_is_copy++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic s16_t model(word_t kp [16], word_t is_w [16], q4_t ctr, logic [7:0][15:0] msg);
    s16_t st, cis, r, d, t, res;
    for (int i = 0; i < 16; i++) st[i] = kp[i] ^ is_w[i];
    cis = pi_perm(st);
    d = cis;
    for (int i = 0; i < 4; i++) d[i] ^= ctr[i];
    r = pi_perm(d);
    d = r;
    for (int i = 0; i < 8; i++) d[i] ^= msg[i];
    t = pi_perm(d);
    for (int i = 0; i < 8; i++) begin res[i] = d[i]; res[8 + i] = t[i]; end
    return res;   // words 0..7 ciphertext, 8..15 tag
  endfunction

  task automatic send_kp(word_t w);
    if ($urandom_range(3) == 0) begin n_stall++; repeat ($urandom_range(4, 1)) @(negedge clk); end
    key_pmn = w; key_pmn_valid = 1;
    @(negedge clk);
    key_pmn_valid = 0; key_pmn = word_t'($urandom);
  endtask

  task automatic send_msg(word_t w);
    if ($urandom_range(3) == 0) begin n_stall++; repeat ($urandom_range(4, 1)) @(negedge clk); end
    message = w; msg_valid = 1;
    @(negedge clk);
    msg_valid = 0; message = word_t'($urandom);
  endtask

  task automatic run(logic [3:0] pcv, bit fixed);
    logic [2:0] kg;
    bit sk, sp, si;
    word_t kp [16], is_w [16];
    q4_t ctr;
    logic [7:0][15:0] msg;
    s16_t e;
    int c_last, lat;
    kg = (pcv[2:0] == 3'b000 || pcv[2:0] == 3'b111) ? 3'b110 : pcv[2:0];
    sk = kg inside {3'b001, 3'b010, 3'b011, 3'b101, 3'b110};
    sp = kg inside {3'b011, 3'b100, 3'b101, 3'b110};
    si = kg inside {3'b010, 3'b011, 3'b101};
    if (pcv == 4'b0000) n_auto++; else n_manual++;
    if (si) n_user_is++;
    for (int i = 0; i < 16; i++) begin
      kp[i]   = (i == KW + PW) ? 16'h8000 : 16'h0000;
      is_w[i] = '0;
    end
    if (sk) for (int i = 0; i < KW; i++) kp[i] = fixed ? word_t'(32'h0100 + i) : word_t'($urandom);
    if (sp) for (int i = 0; i < PW; i++) kp[KW + i] = fixed ? word_t'(32'hA000 + i) : word_t'($urandom);
    if (si) for (int i = 0; i < 16; i++) is_w[i] = word_t'($urandom);
    for (int i = 0; i < 4; i++) ctr[i] = fixed ? word_t'(i == 3) : word_t'($urandom);
    for (int i = 0; i < 8; i++) msg[i] = fixed ? word_t'(32'h4D00 + i) : word_t'($urandom);
    e = fixed ? {16'h1BFB, 16'h0079, 16'hDFCE, 16'hF4B8, 16'hE237, 16'hE9E2, 16'hB9F4, 16'h28B5,
                 16'hBAA4, 16'hF0F0, 16'h7DC3, 16'hDA22, 16'hB8FD, 16'h6AAD, 16'hFAA4, 16'h9CDF}
              : model(kp, is_w, ctr, msg);

    @(negedge clk);
    pc = pcv;
    start = 1;
    @(negedge clk);
    start = 0;
    pc = 4'($urandom);
    fork
      begin
        @(negedge clk);   // key/PMN words are taken from the second cycle after start
        if (sk) for (int i = 0; i < KW; i++) send_kp(kp[i]);
        if (sp) for (int i = 0; i < PW; i++) send_kp(kp[KW + i]);
        if (si) for (int i = 0; i < 16; i++) send_kp(is_w[i]);
      end
      begin
        for (int i = 0; i < 4; i++) send_msg(ctr[i]);
        for (int i = 0; i < 8; i++) send_msg(msg[i]);
      end
    join
    c_last = cyc - 1;   // cycle of the last input word
    while (!tag_flag) begin
      checks++;
      if (!busy) begin failures++; $display("busy low before output"); end
      @(negedge clk);
    end
    lat = cyc - c_last;
    checks++;
    if (lat != 1256) begin failures++; $display("last input to output: %0d cycles, expected 1256", lat); end
    n_out++;
    for (int i = 0; i < 8; i++) begin
      checks += 3;
      if (!tag_flag) begin failures++; $display("tag_flag dropped at word %0d", i); end
      if (cipher_txt !== e[i]) begin failures++; $display("PC %b cipher %0d: got %h exp %h", pcv, i, cipher_txt, e[i]); end
      if (tag !== e[8 + i]) begin failures++; $display("PC %b tag %0d: got %h exp %h", pcv, i, tag, e[8 + i]); end
      @(negedge clk);
    end
    checks += 2;
    if (tag_flag) failures++;
    if (busy) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(4'b0000, 1'b1);
    run(4'b0000, 1'b0);
    run(4'b0110, 1'b0);
    run(4'b0011, 1'b0);
    run(4'b0001, 1'b0);
    run(4'b0100, 1'b0);
    run(4'b0101, 1'b0);
    run(4'b0010, 1'b0);
    run(4'b0111, 1'b0);
    begin
      int cnt [9];
      string nm [9];
      cnt = '{n_auto, n_manual, n_user_is, n_stall, n_pf_kpig, n_pf_ctr, n_pf_msg, n_is_copy, n_out};
      nm = '{"automatic mode", "manual mode", "user IS", "input stall", "pi call on KPIG",
                        "pi call on counter", "pi call on message", "CIS copy to KPIG", "output phase"};
      for (int i = 0; i < 9; i++) begin
        $display("%-20s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("mechanism never happened: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
