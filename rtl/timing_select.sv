// timing_select -- timing select module (TSM): picks one tap of the TGM chain.
//
// A plain (STAGES+1)-input multiplexer: y = taps[sel]. Indices above STAGES
// select the last tap. Purely combinational; its own delay is what the delay
// match module on the neighbour-wire path balances.
module timing_select #(
  parameter int unsigned STAGES = 48,
  localparam int unsigned SEL_W = $clog2(STAGES + 1)
) (
  input  logic [STAGES:0]  taps,
  input  logic [SEL_W-1:0] sel,
  output logic             y
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    if (32'(sel) > STAGES) y = taps[STAGES];
    else                   y = taps[sel];
  end
endmodule
