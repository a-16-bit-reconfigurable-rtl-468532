// dbus_mux: the 2x1 data-bus multiplexer in front of the pi-function core.
//
// DBSEL = 0 routes the KPIG stream (Kpmn_DB) to the pi-function input, DBSEL = 1 the ALU
// stream (ALU_DB). The pi-function's word-take strobe is steered back to the selected
// source only, so that source alone advances its read pointer (the strobe steering is this
// design's addition). Purely combinational.
module dbus_mux
  import pi16_pkg::*;
(
  input  logic  dbsel,
  input  word_t kpmn_db,
  input  word_t alu_db,
  input  logic  take,
  output logic  kpmn_rd,
  output logic  alu_rd,
  output word_t kpm_alu_db
);

  always_comb begin
    kpm_alu_db = dbsel ? alu_db : kpmn_db;
    kpmn_rd    = take & ~dbsel;
    alu_rd     = take & dbsel;
  end

endmodule
