// alu16: the 16-bit ALU of the message processor.
//
// It owns two 32-byte buffers. The message buffer receives, through the MESSAGE port while
// ALU_mode is 00, four counter words (its first 64 bits) followed by eight message words
// (a 128-bit block); ALU_flag goes high once all twelve are stored. The result buffer
// always captures the pi-function output (PF_ALU_DB): each pf_valid word is written at the
// next position, modulo 16.
// The ALU's output stream ALU_DB, sixteen words served one per rd strobe, is the result
// buffer, either passed unchanged or with part of the message buffer xored in:
//   ALU_mode 00, 01  pass the pi-function result
//   ALU_mode 10      xor the counter into words 0..3
//   ALU_mode 11      xor the message into words 0..7
// A change of ALU_mode restarts the output stream at word 0; entering mode 00 also empties
// the message buffer for a new counter and message. The mode encoding and the buffer
// positions are this design's choices.
module alu16
  import pi16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] alu_mode,
  input  word_t      message,
  input  logic       msg_valid,
  input  word_t      pf_db,
  input  logic       pf_valid,
  input  logic       rd,
  output word_t      alu_db,
  output logic       alu_flag
);

  localparam int unsigned CTR_WORDS = 4;
  localparam int unsigned MSG_WORDS = 8;

  word_t      mbuf [16];
  word_t      rbuf [16];
  logic [3:0] mcnt, rcnt, ocnt;
  logic [1:0] mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcnt   <= '0;
      rcnt   <= '0;
      ocnt   <= '0;
      mode_q <= 2'b00;
      for (int i = 0; i < 16; i++) begin
        mbuf[i] <= '0;
        rbuf[i] <= '0;
      end
    end else begin
      mode_q <= alu_mode;
      if (alu_mode != mode_q) begin
        ocnt <= '0;
        if (alu_mode == 2'b00) mcnt <= '0;
      end else if (rd) begin
        ocnt <= ocnt + 4'd1;
      end
      if (alu_mode == 2'b00 && msg_valid && 32'(mcnt) < CTR_WORDS + MSG_WORDS) begin
        mbuf[mcnt] <= message;
        mcnt       <= mcnt + 4'd1;
      end
      if (pf_valid) begin
        rbuf[rcnt] <= pf_db;
        rcnt       <= rcnt + 4'd1;
      end
    end
  end

  always_comb begin
    alu_db = rbuf[ocnt];
    unique case (alu_mode)
      2'b10: if (32'(ocnt) < CTR_WORDS) alu_db = rbuf[ocnt] ^ mbuf[ocnt];
      2'b11: if (32'(ocnt) < MSG_WORDS) alu_db = rbuf[ocnt] ^ mbuf[4'(CTR_WORDS) + ocnt];
      default: ;
    endcase
  end

  assign alu_flag = (32'(mcnt) == CTR_WORDS + MSG_WORDS);

endmodule
