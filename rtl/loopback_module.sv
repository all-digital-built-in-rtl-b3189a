// loopback_module -- loop-back switches at the far end of the bus.
//
// The port at the far end receives the test wave on wire lb_src and sends it
// back on wire lb_dst, where the source port's receiver and multiplexer pick
// it up. The switches are modelled as a multiplexer per wire: drv_x[lb_dst]
// follows rcv[lb_src], every other data line is held low. Which drivers are
// actually enabled is decided by the configuration, not here. Combinational.
module loopback_module
  import bdcm_pkg::*;
(
  input  logic [BUS_LANES-1:0] rcv,
  input  logic [LANE_W-1:0]    lb_src,
  input  logic [LANE_W-1:0]    lb_dst,
  output logic [BUS_LANES-1:0] drv_x
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    drv_x = '0;
    drv_x[lb_dst] = rcv[lb_src];
  end
endmodule
