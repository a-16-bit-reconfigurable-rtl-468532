// arx_add_bank: output adding bank of the ARX engine (OAC).
//
// Four parallel 16-bit adders combine the X-core and Y-core XOR bank outputs into the
// result tuple Z of the *-operation: Z3 = X0+Y0, Z0 = X1+Y1, Z1 = X2+Y2, Z2 = X3+Y3.
// The sums are registered when en is high.
module arx_add_bank
  import pi16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t x,
  input  quad_t y,
  output quad_t z
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z <= '0;
    else if (en) begin
      z[3] <= x[0] + y[0];
      z[0] <= x[1] + y[1];
      z[1] <= x[2] + y[2];
      z[2] <= x[3] + y[3];
    end
  end

endmodule
