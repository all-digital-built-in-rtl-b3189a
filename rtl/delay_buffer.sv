// delay_buffer -- behavioural model of a fixed delay buffer.
//
// Behavioural model, not synthesizable logic: a real implementation is a chain
// of buffer cells sized in layout. Two instances appear in the design: the
// delay element of the source module, which balances the reference path
// against the delay of the return multiplexer and the loop-back switches, and
// the delay match module (DMM) of the crosstalk configuration, which balances
// the neighbour-wire path against the timing select and polarity select
// modules. The output follows the input after DELAY_PS picoseconds (inertial:
// pulses shorter than the delay are swallowed, as in a buffer chain). The
// 100 ps default is this design's choice; the real value follows from the
// layout it has to match.
module delay_buffer #(
  parameter int unsigned DELAY_PS = 100
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(DELAY_PS) y = a;
endmodule
