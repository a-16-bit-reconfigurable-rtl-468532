// out_buffer: 16-byte output buffer of the message processor (the ciphertext buffer and
// the tag buffer are two instances).
//
// Eight 16-bit words. While en is high the word din is written at addr; dout always shows
// the word at addr (combinational read), so the control unit reads the buffer out by
// walking addr with en low. The address is 4 bits wide; addresses 8..15 are not stored,
// writes there are dropped and they read as zero (this design's choice).
module out_buffer
  import pi16_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [3:0] addr,
  input  word_t      din,
  output word_t      dout
);

  word_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (en && 32'(addr) < DEPTH) begin
      mem[addr[$clog2(DEPTH)-1:0]] <= din;
    end
  end

  assign dout = (32'(addr) < DEPTH) ? mem[addr[$clog2(DEPTH)-1:0]] : '0;

endmodule
