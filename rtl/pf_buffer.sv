// pf_buffer: the 128-byte pi-function buffer (64 words of 16 bits).
//
// Layout (this design's choice within the split into a 96-byte part for constants and
// input data and a 32-byte part for intermediate results):
//   words  0..15  state: the 256-bit input, each round's output and the final result
//   words 16..39  the six 64-bit round constants, C1/C2 of rounds 1..3 (loaded by reset)
//   words 40..47  unused
//   words 48..63  intermediate results of the forward chain of a round
// Three combinational read ports: PA and PB (6-bit addresses) feed the X and Y inputs of
// the ARX engine; PO (4-bit address into the state words) is the core's output bus.
// One synchronous write port shares the PA address: when WRENA is high the word chosen by
// IOSEL (0: ISTRM input stream, 1: AE bus from the ARX engine) is written at ADDR_PA.
module pf_buffer
  import pi16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] addr_pa,
  input  logic [5:0] addr_pb,
  input  logic [3:0] addr_po,
  input  logic       wrena,
  input  logic       iosel,
  input  word_t      istrm,
  input  word_t      ae,
  output word_t      pa,
  output word_t      pb,
  output word_t      po
);

  word_t mem [PF_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < PF_DEPTH; a++)
        mem[a] <= (a >= PF_RC_BASE && a < PF_RC_BASE + 24)
                  ? round_const((a - PF_RC_BASE) / 4, (a - PF_RC_BASE) % 4) : '0;
    end else if (wrena) begin
      mem[addr_pa] <= iosel ? ae : istrm;
    end
  end

  assign pa = mem[addr_pa];
  assign pb = mem[addr_pb];
  assign po = mem[PF_STATE_BASE + 32'(addr_po)];

endmodule
