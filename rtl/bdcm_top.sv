// bdcm_top -- bus delay and crosstalk measurement (BDCM) fabric for one
// on-chip bus with NPORTS ports of BUS_LANES wires.
//
// Every port has a BDCM module between the internal logic and the port's
// drivers. The modules form one configuration chain, port 0 first: a word of
// NPORTS * bdcm_pkg::CFG_W bits is shifted in on cfg_si (the bits of the last
// port first, each word MSB first) and activated with cfg_update. One port is
// then configured as source and one or more as loop-back ends; meas_start
// starts the measurement and, N_SAMPLES clock cycles later, meas_done[p] of the
// source port p rises with the count k in meas_count[p].
//
// The bus drivers, receivers and wires are outside: drv_x/drv_e go to the
// drivers' X/E pins, rcv comes from the receivers' Y pins. The test wave
// arrives on test_wave; clk must be asynchronous to it.
//
// Four ports of four wires follow the architecture this design implements;
// the sample count, the delay-buffer values and the TGM chain are this
// design's choices.
module bdcm_top
  import bdcm_pkg::*;
#(
  parameter int unsigned NPORTS    = 4,
  parameter int unsigned N_SAMPLES = 4096,
  parameter int unsigned DELAY_PS  = 100,
  parameter int unsigned DMM_PS    = 100,
  parameter int unsigned STAGE_PS  = 500,
  localparam int unsigned CNT_W    = $clog2(N_SAMPLES + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cfg_si,
  input  logic                              cfg_shift,
  input  logic                              cfg_update,
  output logic                              cfg_so,
  input  logic                              test_wave,
  input  logic                              meas_start,
  input  logic [NPORTS-1:0][BUS_LANES-1:0]  norm_x,
  input  logic [NPORTS-1:0][BUS_LANES-1:0]  norm_e,
  input  logic [NPORTS-1:0][BUS_LANES-1:0]  rcv,
  output logic [NPORTS-1:0][BUS_LANES-1:0]  drv_x,
  output logic [NPORTS-1:0][BUS_LANES-1:0]  drv_e,
  output logic [NPORTS-1:0]                 meas_busy,
  output logic [NPORTS-1:0]                 meas_done,
  output logic [NPORTS-1:0][CNT_W-1:0]      meas_count
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [NPORTS:0] chain;
  cfg_t            cfg [NPORTS];

  assign chain[0] = cfg_si;
  assign cfg_so   = chain[NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    bdcm_module #(
      .N_SAMPLES(N_SAMPLES), .DELAY_PS(DELAY_PS), .DMM_PS(DMM_PS), .STAGE_PS(STAGE_PS)
    ) u_bdcm (
      .clk, .rst_n,
      .cfg_si(chain[p]), .cfg_shift, .cfg_update, .cfg_so(chain[p+1]),
      .wave(test_wave), .meas_start,
      .norm_x(norm_x[p]), .norm_e(norm_e[p]), .rcv(rcv[p]),
      .drv_x(drv_x[p]), .drv_e(drv_e[p]),
      .busy(meas_busy[p]), .done(meas_done[p]), .count(meas_count[p]),
      .cfg(cfg[p])
    );
  end

  // Bus rule in test mode: a wire is never driven from two ports at once.
  // (Two sources on disjoint wires may measure together.)
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    for (genvar q = p + 1; q < NPORTS; q++) begin : g_pair
      a_single_driver: assert property (@(posedge clk) disable iff (!rst_n)
        (cfg[p].test_mode && cfg[q].test_mode) |-> ((drv_e[p] & drv_e[q]) == '0));
    end
  end
endmodule
