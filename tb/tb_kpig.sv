// tb_kpig: takes the KPIG through all eight key_gen modes of its mode table, with gaps in
// the input strobes, and checks every output stream against (Key || PMN || 10*) xor IS
// kept in a model here: which buffers each mode stores, that 000 clears both, that 111
// stores IS from the is_in port, and that Kpmn_flag is high exactly until 16 words are read.
module tb_kpig;
  import pi16_pkg::*;
  localparam int KW = 6, PW = 2;
  logic clk = 0, rst_n = 0, key_pmn_valid = 0, is_valid = 0, rd = 0, kpmn_flag;
  logic [2:0] key_gen = 0;
  word_t key_pmn = 0, is_in = 0, kpmn_db;
  word_t kp_m [16], is_m [16];
  int checks = 0, failures = 0;
  int mode_seen [8];

  kpig #(.KEY_WORDS(KW), .PMN_WORDS(PW)) dut (.clk, .rst_n, .key_gen, .key_pmn, .key_pmn_valid,
    .is_in, .is_valid, .rd, .kpmn_db, .kpmn_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(word_t w, bit to_is_port);
    while ($urandom_range(2) == 0) @(negedge clk);   // random gap
    if (to_is_port) begin is_in = w; is_valid = 1; end
    else begin key_pmn = w; key_pmn_valid = 1; end
    @(negedge clk);
    is_valid = 0; key_pmn_valid = 0;
    key_pmn = word_t'($urandom); is_in = word_t'($urandom);
  endtask

  task automatic run_mode(logic [2:0] m);
    bit sk, sp, si, out;
    word_t w, e;
    sk  = m inside {3'b001, 3'b010, 3'b011, 3'b101, 3'b110};
    sp  = m inside {3'b011, 3'b100, 3'b101, 3'b110};
    si  = m inside {3'b010, 3'b011, 3'b101};
    out = m != 3'b000 && m != 3'b111;
    mode_seen[m]++;
    @(negedge clk);
    key_gen = m;
    @(negedge clk);
    if (m == 3'b000) for (int i = 0; i < 16; i++) begin kp_m[i] = '0; is_m[i] = '0; end
    if (sk) for (int i = 0; i < KW; i++) begin w = word_t'($urandom); kp_m[i] = w; put(w, 0); end
    if (sp) for (int i = 0; i < PW; i++) begin w = word_t'($urandom); kp_m[KW + i] = w; put(w, 0); end
    if (si) for (int i = 0; i < 16; i++) begin w = word_t'($urandom); is_m[i] = w; put(w, 0); end
    if (m == 3'b111) for (int i = 0; i < 16; i++) begin w = word_t'($urandom); is_m[i] = w; put(w, 1); end
    @(negedge clk);
    checks++;
    if (kpmn_flag != out) begin failures++; $display("mode %b: flag %b", m, kpmn_flag); end
    if (out) begin
      for (int i = 0; i < 16; i++) begin
        while ($urandom_range(2) == 0) @(negedge clk);
        e = ((i < KW + PW) ? kp_m[i] : (i == KW + PW) ? 16'h8000 : 16'h0000) ^ is_m[i];
        checks += 2;
        if (!kpmn_flag) begin failures++; $display("mode %b word %0d: flag low", m, i); end
        if (kpmn_db !== e) begin failures++; $display("mode %b word %0d: got %h exp %h", m, i, kpmn_db, e); end
        rd = 1;
        @(negedge clk);
        rd = 0;
      end
      checks++;
      if (kpmn_flag) begin failures++; $display("mode %b: flag still high", m); end
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin kp_m[i] = '0; is_m[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) begin
      run_mode(3'b110);  // automatic: key and PMN
      run_mode(3'b111);  // IS from the pi-function
      run_mode(3'b001);  // key only, IS kept
      run_mode(3'b100);  // PMN only
      run_mode(3'b011);  // key, PMN and IS
      run_mode(3'b010);  // key and IS
      run_mode(3'b101);  // PMN, key and IS
      run_mode(3'b000);  // clear
      run_mode(3'b100);  // PMN after clear: key and IS read as zero
    end
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("mode %0d never run", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
