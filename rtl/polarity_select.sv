// polarity_select -- polarity select module (PSM) of the crosstalk configuration.
//
// An exclusive-OR: with p = 0 the wire under test switches in the same
// direction as its neighbours (in-phase crosstalk), with p = 1 in the opposite
// direction (out-of-phase crosstalk). Combinational.
module polarity_select (
  input  logic a,
  input  logic p,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  assign y = a ^ p;
endmodule
