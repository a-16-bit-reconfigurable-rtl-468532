// arx_rotator: four-lane 16-bit left rotator of one ARX core (XRC / YRC in the engine).
//
// Each lane i left-rotates its adder output by the fixed amount ROT[i]; the amounts are the
// rotation constants of the *-operation (1,4,9,11 for the X core, 2,5,7,13 for the Y core).
// Fixing the amounts by parameter, rather than by a control word, is this design's choice.
// The result is registered when en is high, so it appears one cycle later.
module arx_rotator
  import pi16_pkg::*;
#(
  parameter rot4_t ROT = ROT_X
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t t,      // Tx0..Tx3 from the adders
  output quad_t tr      // Txr0..Txr3 to the XOR bank
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tr <= '0;
    else if (en) begin
      for (int i = 0; i < 4; i++) tr[i] <= rotl16(t[i], ROT[i]);
    end
  end

endmodule
