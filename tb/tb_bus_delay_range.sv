// tb_bus_delay_range -- one-way delay of a wire under crosstalk, measured
// through the full fabric (default parameters) on the behavioural bus model.
//
// Port 0 drives wire 1 (victim) and, in two of the three cases, wires 0 and 2
// (neighbours) through the DMM; port 1 loops wire 1 back on wire 3. The tap is
// 1 (500 ps), so the victim switches 400 ps after its neighbours and its
// return edge on wire 3, 2.7 ns later, is outside the neighbours' reach. The
// victim's one-way delay is the reading plus the 100 ps delay element minus
// the 2.7 ns return. Expected with the model's settings: 1.9 ns (neighbours
// switching the same way), 2.7 ns (neighbours silent), 3.9 ns (neighbours
// switching the other way), each within 150 ps.
module tb_bus_delay_range;
  import bdcm_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int NP    = 4;
  localparam int N     = 4096;
  localparam int CNT_W = $clog2(N + 1);
  localparam int T_PS  = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_si = 1'b0, cfg_shift = 1'b0, cfg_update = 1'b0, cfg_so;
  logic test_wave = 1'b0, meas_start = 1'b0;
  logic [NP-1:0][BUS_LANES-1:0] norm_x = '0, norm_e = '0, rcv, drv_x, drv_e;
  logic [NP-1:0]                meas_busy, meas_done;
  logic [NP-1:0][CNT_W-1:0]     meas_count;
  int checks = 0, failures = 0;

  bdcm_top dut (.*);
  bus_model #(.NPORTS(NP), .LANES(BUS_LANES)) u_bus (.drv_x, .drv_e, .rcv);

  always #(1517 + $urandom_range(0, 100) - 50) clk = !clk;
  always #(T_PS / 2) test_wave = !test_wave;

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input logic [BUS_LANES-1:0] en, input bit p, input int exp_ps, input string what);
    cfg_t cw [NP];
    real  rt, one_way;
    for (int q = 0; q < NP; q++) begin
      cw[q] = '0;
      cw[q].test_mode = 1'b1;
    end
    cw[0].role     = ROLE_SOURCE;
    cw[0].drv_en   = en;
    cw[0].ret_lane = 2'd3;
    cw[0].xt_en    = 1'b1;
    cw[0].agg_mask = 4'b0101;
    cw[0].tap_sel  = TAP_W'(1);
    cw[0].polarity = p;
    cw[1].role     = ROLE_LOOPBACK;
    cw[1].drv_en   = 4'b1000;
    cw[1].lb_src   = 2'd1;
    cw[1].lb_dst   = 2'd3;
    for (int q = NP - 1; q >= 0; q--)
      for (int b = CFG_W - 1; b >= 0; b--) begin
        @(negedge clk);
        cfg_si    = cw[q][b];
        cfg_shift = 1'b1;
      end
    @(negedge clk) cfg_shift = 1'b0;
    cfg_update = 1'b1;
    @(negedge clk) cfg_update = 1'b0;
    #(3 * T_PS);
    @(negedge clk) meas_start = 1'b1;
    @(negedge clk) meas_start = 1'b0;
    wait (meas_done[0]);
    rt      = real'(meas_count[0]) * T_PS / (2.0 * N);
    one_way = rt + 100 - 2700;
    $display("%-34s round trip %7.1f ps, one way %7.1f ps", what, rt, one_way);
    checks++;
    if (one_way < exp_ps - 150 || one_way > exp_ps + 150) begin
      failures++;
      $display("FAIL %s: expected %0d ps", what, exp_ps);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #(2 * T_PS);
    run_case(4'b0111, 1'b0, 1900, "neighbours switching the same way");
    run_case(4'b0010, 1'b0, 2700, "neighbours silent");
    run_case(4'b0111, 1'b1, 3900, "neighbours switching the other way");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
