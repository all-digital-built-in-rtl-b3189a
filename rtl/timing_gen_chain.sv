// timing_gen_chain -- timing generation module (TGM): a buffer chain with taps.
//
// Behavioural model, not synthesizable logic: in silicon this is a chain of
// STAGES buffers. Tap 0 is the input, tap i is the input delayed by i stage
// delays, so the timing select module can launch the test signal of the wire
// under test at t_i = i * STAGE_PS after the neighbour wires. The chain must
// span the whole duration of the crosstalk effect; the 48 x 500 ps = 24 ns
// default covers the 22 ns of switching offsets over which such a profile is
// typically plotted. Stage count and stage delay are this design's choice: in
// silicon they are not known in advance and are calibrated with the delay
// measurement module before use.
module timing_gen_chain #(
  parameter int unsigned STAGES   = 48,
  parameter int unsigned STAGE_PS = 500
) (
  input  logic            a,
  output logic [STAGES:0] taps
);
  timeunit 1ps;
  timeprecision 1ps;

  assign taps[0] = a;
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    delay_buffer #(.DELAY_PS(STAGE_PS)) u_buf (.a(taps[i]), .y(taps[i+1]));
  end
endmodule
