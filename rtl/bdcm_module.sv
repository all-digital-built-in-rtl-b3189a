// bdcm_module -- the BDCM module of one bus port.
//
// Holds the port's configuration word (bdcm_pkg::cfg_t) and, according to it,
// lets the port work normally or turns it into the source or the loop-back
// end of a measurement. Modules of all ports are chained: while cfg_shift is
// high, each clock shifts cfg_si into the module's shift register (LSB in,
// MSB out on cfg_so, which feeds the next port's module); cfg_update copies
// the shift register into the active configuration in one cycle, so every
// port changes mode together. Reset clears the configuration: normal mode.
//
// In test mode the port multiplexer hands the drivers to the module: a source
// drives the source module's test data, a loop-back end the loop-back
// module's, an idle port disables all its drivers. cfg.drv_en chooses which
// drivers are enabled. meas_start starts a measurement only in a module
// configured as source in test mode.
//
// The per-port module and its chaining follow the BDCM architecture; what the
// chain carries, its shift/update protocol and the configuration encoding are
// this design's choices.
module bdcm_module
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
  input  logic                 cfg_si,
  input  logic                 cfg_shift,
  input  logic                 cfg_update,
  output logic                 cfg_so,
  input  logic                 wave,
  input  logic                 meas_start,
  input  logic [BUS_LANES-1:0] norm_x,
  input  logic [BUS_LANES-1:0] norm_e,
  input  logic [BUS_LANES-1:0] rcv,
  output logic [BUS_LANES-1:0] drv_x,
  output logic [BUS_LANES-1:0] drv_e,
  output logic                 busy,
  output logic                 done,
  output logic [CNT_W-1:0]     count,
  output cfg_t                 cfg
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [CFG_W-1:0]     shreg;
  logic [BUS_LANES-1:0] src_x, lb_x, test_x, test_e;
  logic                 is_source;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      cfg   <= '0;
    end else begin
      if (cfg_shift)  shreg <= {shreg[CFG_W-2:0], cfg_si};
      if (cfg_update) cfg   <= cfg_t'(shreg);
    end
  end
  assign cfg_so = shreg[CFG_W-1];

  assign is_source = cfg.test_mode && (cfg.role == ROLE_SOURCE);

  source_module #(
    .N_SAMPLES(N_SAMPLES), .DELAY_PS(DELAY_PS), .DMM_PS(DMM_PS), .STAGE_PS(STAGE_PS)
  ) u_src (
    .clk, .rst_n, .wave, .cfg, .start(meas_start && is_source), .rcv,
    .drv_x(src_x), .busy, .done, .count
  );

  loopback_module u_lb (.rcv, .lb_src(cfg.lb_src), .lb_dst(cfg.lb_dst), .drv_x(lb_x));

  always_comb begin
    unique case (cfg.role)
      ROLE_SOURCE:   begin test_x = src_x; test_e = cfg.drv_en; end
      ROLE_LOOPBACK: begin test_x = lb_x;  test_e = cfg.drv_en; end
      default:       begin test_x = '0;    test_e = '0;         end
    endcase
  end

  port_mux u_mux (.test_mode(cfg.test_mode), .norm_x, .norm_e, .test_x, .test_e, .drv_x, .drv_e);
endmodule
