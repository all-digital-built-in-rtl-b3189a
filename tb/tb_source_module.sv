// tb_source_module -- source module in its delay and crosstalk configurations.
//
// The far end is modelled by giving receiver l a copy of driver l's data
// delayed by (l+1) ns, so each return-multiplexer setting has its own
// delay. Checks: (1) the measured delay for every return wire equals that
// round trip less the 100 ps delay element; (2) in crosstalk mode the
// neighbour wires carry the wave delayed by the 100 ps DMM and the wire under
// test carries tap t_i = i * 500 ps with polarity P; (3) calibration measures
// t_i itself; (4) a crosstalk-mode round trip is measured against the timed
// signal. Delays are read as d = k * T / (2N) with T = 20 ns.
module tb_source_module;
  import bdcm_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int unsigned N     = 4096;
  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int          T_PS  = 20000;
  logic                 clk = 1'b0, rst_n = 1'b0, start = 1'b0, wave = 1'b0;
  cfg_t                 cfg;
  logic [BUS_LANES-1:0] rcv, drv_x;
  logic                 busy, done;
  logic [CNT_W-1:0]     count;
  int checks = 0, failures = 0;

  source_module dut (.*);

  always #(1500 + $urandom_range(0, 100) - 50) clk = !clk;
  always #(T_PS / 2) wave = !wave;
  for (genvar l = 0; l < BUS_LANES; l++) begin : g_far
    always @(drv_x[l]) rcv[l] <= #((l + 1) * 1000) drv_x[l];
  end

  // The wave starts low at time 0 and toggles every T/2: its value at any
  // time away from an edge, used to predict the drive data.
  function automatic logic wave_at(input longint t);
    return (t < 0) ? 1'b0 : 1'((t / (T_PS / 2)) % 2);
  endfunction

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real exp_ps, input string what);
    real meas;
    #(3 * T_PS);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    meas = real'(count) * T_PS / (2.0 * N);
    checks++;
    if (meas < exp_ps - 100 || meas > exp_ps + 100) begin
      failures++;
      $display("FAIL %s: measured %0.1f ps, expected %0.1f ps", what, meas, exp_ps);
    end
  endtask

  initial begin
    rcv = '0;
    cfg = '0;
    cfg.test_mode = 1'b1;
    cfg.role      = ROLE_SOURCE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // (1) delay configuration, every return wire
    for (int l = 0; l < BUS_LANES; l++) begin
      cfg.ret_lane = LANE_W'(l);
      measure((l + 1) * 1000 - 100, "delay configuration");
    end

    // (2) crosstalk drive data
    cfg.xt_en    = 1'b1;
    cfg.agg_mask = 4'b0101;
    for (int i = 0; i <= int'(TGM_STAGES); i += 7) begin
      for (int p = 0; p < 2; p++) begin
        cfg.tap_sel  = TAP_W'(i);
        cfg.polarity = 1'(p);
        #(2 * T_PS);
        for (int s = 0; s < 20; s++) begin
          logic e_dmm, e_tap;
          // sample halfway between 50 ps time steps, clear of every edge
          #($urandom_range(10, 30) * 100 + 50 - ($time % 100));
          e_dmm = wave_at($time - 100);
          e_tap = wave_at($time - longint'(i) * 500) ^ 1'(p);
          checks++;
          if (drv_x[0] !== e_dmm || drv_x[2] !== e_dmm || drv_x[1] !== e_tap || drv_x[3] !== e_tap) begin
            failures++;
            $display("FAIL xt drive tap %0d P %0d: drv_x=%b dmm=%b tap=%b", i, p, drv_x, e_dmm, e_tap);
          end
        end
      end
    end

    // (3) calibration of some taps (P = 0)
    cfg.polarity = 1'b0;
    cfg.cal      = 1'b1;
    for (int i = 2; i < 20; i += 5) begin
      cfg.tap_sel = TAP_W'(i);
      measure(i * 500, "calibration");
    end

    // (4) crosstalk-mode round trip on wire 1 (1 ns + 1 ns through the far end)
    cfg.cal      = 1'b0;
    cfg.ret_lane = 2'd1;
    cfg.tap_sel  = TAP_W'(5);
    cfg.polarity = 1'b1;
    measure(2000 - 100, "crosstalk round trip");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
