// arx_xor_bank: XOR mixing stage of one ARX core (XXC / XYC in the engine).
//
// Every output word is the XOR of three of the four rotated words T0..T3, as the
// *-operation prescribes:
//   X side (DIR=0): X0 = T0^T1^T3, X1 = T0^T1^T2, X2 = T1^T2^T3, X3 = T0^T2^T3
//   Y side (DIR=1): Y0 = T1^T2^T3, Y1 = T0^T2^T3, Y2 = T0^T1^T3, Y3 = T0^T1^T2
// (these are T4..T7 and T8..T11 of the algorithm; which bus carries which follows the
// final adding bank, Z3 = X0+Y0, Z0 = X1+Y1, Z1 = X2+Y2, Z2 = X3+Y3). The outputs are
// registered when en is high.
module arx_xor_bank
  import pi16_pkg::*;
#(
  parameter bit DIR = 1'b0     // 0: X direction, 1: Y direction
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t tr,
  output quad_t xo
);

  quad_t mix;

  always_comb begin
    if (DIR == 1'b0) begin
      mix[0] = tr[0] ^ tr[1] ^ tr[3];
      mix[1] = tr[0] ^ tr[1] ^ tr[2];
      mix[2] = tr[1] ^ tr[2] ^ tr[3];
      mix[3] = tr[0] ^ tr[2] ^ tr[3];
    end else begin
      mix[0] = tr[1] ^ tr[2] ^ tr[3];
      mix[1] = tr[0] ^ tr[2] ^ tr[3];
      mix[2] = tr[0] ^ tr[1] ^ tr[3];
      mix[3] = tr[0] ^ tr[1] ^ tr[2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xo <= '0;
    else if (en) xo <= mix;
  end

endmodule
