// pi_function: the pi-function core, the 3-round ARX permutation of a 256-bit state.
//
// A 128-byte buffer holds the state, the round constants and the intermediate results; the
// control unit moves 4-word chunks from the buffer to the X and Y ports of the 16-bit ARX
// engine and the results back, 24 *-operations per call (see pf_ctrl).
//
// Interface: pulse start while the core is idle. In the following 16 cycles in_take is high
// and the core takes one state word per cycle from istrm (word 0 first); the source must
// present word k in the k-th cycle in which in_take is high. 400 cycles later po_valid is
// high for 16 cycles with result words 0..15 on po, followed by a one-cycle pi_flag. Start to
// pi_flag comes 417 cycles after the Start cycle.
module pi_function
  import pi16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t istrm,
  output logic  in_take,
  output word_t po,
  output logic  po_valid,
  output logic  pi_flag
);

  logic [5:0] addr_pa, addr_pb;
  logic [3:0] addr_po;
  logic       wrena, iosel, arx_load, arx_flag;
  logic [1:0] ioena;
  word_t      pa, pb, ae;

  pf_ctrl u_ctrl (
    .clk, .rst_n, .start, .arx_flag, .arx_load,
    .addr_pa, .addr_pb, .addr_po, .wrena, .iosel, .ioena, .pi_flag
  );

  pf_buffer u_buf (
    .clk, .rst_n, .addr_pa, .addr_pb, .addr_po, .wrena, .iosel,
    .istrm, .ae, .pa, .pb, .po
  );

  arx_engine u_arx (.clk, .rst_n, .arx_load, .inpx(pa), .inpy(pb), .op(ae), .arx_flag);

  assign in_take  = ioena[0];
  assign po_valid = ioena[1];

endmodule
