// msg_processor: 16-bit pi-Cipher message processor (top level).
//
// Encrypts and authenticates one 128-bit message block with a 16-bit datapath built around
// a single pi-function core (a 3-round ARX permutation of a 256-bit state computed on one
// 16-bit ARX engine). The flow, sequenced by the MPCU:
//   1. the KPIG stores key and public message number; the ALU stores counter and message
//   2. CIS = pi((Key || PMN || 10*) xor IS), IS being zero after reset/INIT
//   3. R   = pi(CIS xor counter)                (counter xored into words 0..3)
//   4. C   = message xor R[0..7]  -> cipher buffer;  Tag = pi(C || R[8..15])[0..7]
//   5. ciphertext and tag leave on two 16-bit buses, eight words, while tag_flag is high
//
// Interface: pulse start with pc (0000 = automatic: key and PMN from key_pmn). Then give the
// KEY_WORDS key words and PMN_WORDS PMN words on key_pmn (with key_pmn_valid) and four
// counter words and eight message words on message (with msg_valid), word 0 first; the two
// ports are independent and may run at the same time. Message words are taken from the
// cycle after start, key/PMN words from the second cycle after start (the KPIG needs a cycle
// to see its new mode). busy stays high until the eight
// output cycles are over. From the last input word to the first output word takes
// 3 * 417 + a few cycles.
// The composition follows the architecture's block diagram; the strobes, word orders and
// key/PMN sizes are this design's choices.
module msg_processor
  import pi16_pkg::*;
#(
  parameter int unsigned KEY_WORDS = 6,
  parameter int unsigned PMN_WORDS = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] pc,
  input  word_t      key_pmn,
  input  logic       key_pmn_valid,
  input  word_t      message,
  input  logic       msg_valid,
  output word_t      cipher_txt,
  output word_t      tag,
  output logic       tag_flag,
  output logic       busy
);

  logic [2:0] key_gen;
  logic [1:0] alu_mode;
  logic       dbsel, kpmn_flag, alu_flag, pf_start, pf_flag, pf_take, pf_valid;
  logic       kpmn_rd, alu_rd;
  logic       cipher_enable, tag_enable;
  logic [3:0] cipher_addr, tag_addr;
  word_t      kpmn_db, alu_db, kpm_alu_db, pf_alu_db;

  mpcu u_mpcu (
    .clk, .rst_n, .start, .pc, .kpmn_flag, .alu_flag, .pf_flag, .pf_take, .pf_valid,
    .key_gen, .dbsel, .alu_mode, .pf_start, .cipher_enable, .cipher_addr,
    .tag_enable, .tag_addr, .tag_flag, .busy
  );

  kpig #(.KEY_WORDS(KEY_WORDS), .PMN_WORDS(PMN_WORDS)) u_kpig (
    .clk, .rst_n, .key_gen, .key_pmn, .key_pmn_valid,
    .is_in(pf_alu_db), .is_valid(pf_valid), .rd(kpmn_rd), .kpmn_db, .kpmn_flag
  );

  alu16 u_alu (
    .clk, .rst_n, .alu_mode, .message, .msg_valid,
    .pf_db(pf_alu_db), .pf_valid, .rd(alu_rd), .alu_db, .alu_flag
  );

  dbus_mux u_dbus (.dbsel, .kpmn_db, .alu_db, .take(pf_take), .kpmn_rd, .alu_rd, .kpm_alu_db);

  pi_function u_pf (
    .clk, .rst_n, .start(pf_start), .istrm(kpm_alu_db), .in_take(pf_take),
    .po(pf_alu_db), .po_valid(pf_valid), .pi_flag(pf_flag)
  );

  out_buffer u_cbuf (.clk, .rst_n, .en(cipher_enable), .addr(cipher_addr), .din(kpm_alu_db), .dout(cipher_txt));
  out_buffer u_tbuf (.clk, .rst_n, .en(tag_enable),    .addr(tag_addr),    .din(pf_alu_db),  .dout(tag));

endmodule
