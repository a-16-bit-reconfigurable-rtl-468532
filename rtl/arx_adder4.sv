// arx_adder4: four-input 16-bit adder of the ARX engine (one of XA0..XA3 / YA0..YA3).
//
// It sums three words read from the core's buffer through its read ports and a fourth
// operand, which is the *-operation constant when const_sel is set and the fourth read
// port otherwise. As the architecture prescribes, it is built from three two-input
// ripple-carry adders: (p0 + p1) and (p2 + op3) in parallel, then their sum. Registers after
// the read ports, after the first level and after the second level make it a three-stage
// pipeline; this staging is this design's choice and gives the three cycles of the
// engine's buffer-read phase. All arithmetic is modulo 2^16.
//
// Interface: en advances the whole pipeline one stage; sum is valid three enabled cycles
// after the operands were presented.
module arx_adder4
  import pi16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,          // adder control bit 0: pipeline enable
  input  logic  const_sel,   // adder control bit 1: fourth operand is the constant
  input  quad_t p,           // four read-port words
  input  word_t cst,         // *-operation constant of this adder
  output word_t sum
);

  word_t r0, r1, r2, r3;     // read-port latches
  word_t s01, s23;           // first-level sums

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; r2 <= '0; r3 <= '0;
      s01 <= '0; s23 <= '0; sum <= '0;
    end else if (en) begin
      r0  <= p[0];
      r1  <= p[1];
      r2  <= p[2];
      r3  <= const_sel ? cst : p[3];
      s01 <= r0 + r1;
      s23 <= r2 + r3;
      sum <= s01 + s23;
    end
  end

endmodule
