// source_module -- the measuring end of the bus: test-wave launch, return
// multiplexer, delay element and digital delay measurement, plus the crosstalk
// timing chain.
//
// Delay configuration (cfg.xt_en = 0): the test wave is broadcast to the data
// inputs of all drivers of the port (the configuration enables only the ones
// under test). The receiver of wire cfg.ret_lane is selected by the return
// multiplexer (MUX) as signal B; the wave itself, through the delay element
// that balances the MUX and the far-end loop-back switches, is signal A. The
// delay measurement module then counts k, and the round trip is
// d = k * T / (2 * N_SAMPLES) for a wave of period T.
//
// Crosstalk configuration (cfg.xt_en = 1): the wave also runs through the
// timing generation module (TGM), a tap t_i is picked by the timing select
// module (TSM) and its polarity set by the polarity select module (PSM, input
// cfg.polarity = P). That signal drives the wire under test and is the
// reference A. The wires in cfg.agg_mask are driven with the wave through the
// delay match module (DMM), which balances the TSM and PSM. With cfg.cal = 1
// the return multiplexer is bypassed and B is the DMM output, so the module
// measures the TGM tap delay t_i itself (calibration; P must be 0).
//
// This follows the delay measurement and crosstalk configurations of the
// method. The placement of the delay element on the reference path in both
// configurations and the calibration bypass are this design's choices.
// Timing: as delay_meas_module; everything else is combinational.
module source_module
  import bdcm_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 4096,
  parameter int unsigned DELAY_PS  = 100,
  parameter int unsigned DMM_PS    = 100,
  parameter int unsigned STAGE_PS  = 500,
  localparam int unsigned CNT_W    = $clog2(N_SAMPLES + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wave,
  input  cfg_t                 cfg,
  input  logic                 start,
  input  logic [BUS_LANES-1:0] rcv,
  output logic [BUS_LANES-1:0] drv_x,
  output logic                 busy,
  output logic                 done,
  output logic [CNT_W-1:0]     count
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [TGM_STAGES:0] taps;
  logic                timed, victim, aggressor;
  logic                ref_wave, sig_a, sig_b;

  timing_gen_chain #(.STAGES(TGM_STAGES), .STAGE_PS(STAGE_PS)) u_tgm (.a(wave), .taps);
  timing_select #(.STAGES(TGM_STAGES)) u_tsm (.taps, .sel(cfg.tap_sel), .y(timed));
  polarity_select u_psm (.a(timed), .p(cfg.polarity), .y(victim));
  delay_buffer #(.DELAY_PS(DMM_PS)) u_dmm (.a(wave), .y(aggressor));

  // Test data for every driver of the port.
  always_comb begin
    for (int i = 0; i < BUS_LANES; i++) begin
      if (!cfg.xt_en)         drv_x[i] = wave;
      else if (cfg.agg_mask[i]) drv_x[i] = aggressor;
      else                    drv_x[i] = victim;
    end
  end

  assign ref_wave = cfg.xt_en ? victim : wave;
  delay_buffer #(.DELAY_PS(DELAY_PS)) u_delay (.a(ref_wave), .y(sig_a));

  // Return multiplexer, with the calibration bypass.
  assign sig_b = (cfg.xt_en && cfg.cal) ? aggressor : rcv[cfg.ret_lane];

  delay_meas_module #(.N_SAMPLES(N_SAMPLES)) u_ddm (
    .clk, .rst_n, .sig_a, .sig_b, .start, .busy, .done, .count
  );
endmodule
