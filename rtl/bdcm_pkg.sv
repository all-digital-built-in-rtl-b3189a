// bdcm_pkg -- shared constants and types of the bus delay and crosstalk
// measurement (BDCM) fabric.
//
// BUS_LANES is the number of bus wires per port (four, as in the bus model and
// the delay measurement configuration this design follows). TGM_STAGES is the
// length of the timing generation buffer chain; its value is this design's
// choice (see timing_gen_chain). cfg_t is the configuration word each BDCM
// module holds; it is loaded through the serial configuration chain, MSB first.
package bdcm_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned BUS_LANES  = 4;
  localparam int unsigned LANE_W     = $clog2(BUS_LANES);
  localparam int unsigned TGM_STAGES = 48;
  localparam int unsigned TAP_W      = $clog2(TGM_STAGES + 1);

  // What a BDCM module does with its port while in test mode.
  typedef enum logic [1:0] {
    ROLE_IDLE     = 2'd0,  // all drivers of the port disabled
    ROLE_SOURCE   = 2'd1,  // launch the test wave and measure the returned one
    ROLE_LOOPBACK = 2'd2   // route one received wire back onto another wire
  } role_e;

  typedef struct packed {
    logic                  test_mode;  // 1: BDCM owns the port drivers
    role_e                 role;
    logic [BUS_LANES-1:0]  drv_en;     // drivers enabled in test mode
    logic [LANE_W-1:0]     ret_lane;   // source: wire whose receiver feeds the MUX
    logic [LANE_W-1:0]     lb_src;     // loop-back: wire received
    logic [LANE_W-1:0]     lb_dst;     // loop-back: wire driven back
    logic                  xt_en;      // source: crosstalk configuration
    logic [BUS_LANES-1:0]  agg_mask;   // crosstalk: wires driven from the DMM
    logic [TAP_W-1:0]      tap_sel;    // crosstalk: TSM tap, t_i = i stages
    logic                  polarity;   // crosstalk: PSM input P
    logic                  cal;        // crosstalk: measure the TSM path against the DMM path
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);
endpackage
