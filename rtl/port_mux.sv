// port_mux -- gateway multiplexer between a port's drivers, the internal logic
// and the BDCM module.
//
// In normal mode (test_mode = 0) the driver data and enables come from the
// internal logic; in test mode they come from the BDCM module. Combinational.
// The receivers are not multiplexed: their outputs go to both the logic and
// the BDCM module.
module port_mux
  import bdcm_pkg::*;
(
  input  logic                 test_mode,
  input  logic [BUS_LANES-1:0] norm_x,
  input  logic [BUS_LANES-1:0] norm_e,
  input  logic [BUS_LANES-1:0] test_x,
  input  logic [BUS_LANES-1:0] test_e,
  output logic [BUS_LANES-1:0] drv_x,
  output logic [BUS_LANES-1:0] drv_e
);
  timeunit 1ps;
  timeprecision 1ps;

  assign drv_x = test_mode ? test_x : norm_x;
  assign drv_e = test_mode ? test_e : norm_e;
endmodule
