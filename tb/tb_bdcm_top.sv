// tb_bdcm_top -- end-to-end test of the BDCM fabric at its default size
// (4 ports x 4 wires, n = 4096 samples) on a behavioural bus model.
//
// Sequence:
//   1. normal mode: the logic's data crosses the bus untouched;
//   2. delay measurement: port 0 is the source, port 1 loops wire a back on
//      wire b; every round trip is checked against the bus model's delays;
//   3. wire delay fault diagnosis: with wire 1 slowed, the two tests that
//      share wire 1 both fail;
//   4. driver delay fault diagnosis: with port 0's driver on wire 0 slowed,
//      loop-backs through two different ports both fail;
//   5. receiver delay fault diagnosis: with port 0's receiver on wire 3 slowed,
//      returns from two different sources both fail;
//   6. crosstalk: TGM calibration (step 1), intrinsic delay with silent
//      neighbours (step 2), in-phase (P = 0, step 3) and out-of-phase
//      (P = 1, step 4) sweeps of every tap, each checked against the model.
// Delays are read as d = k * T / (2n), T = 20 ns; the tolerance is 150 ps (300 ps on a difference of two readings).
// Each mechanism is counted and a failure is counted for one never seen.
module tb_bdcm_top;
  import bdcm_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int NP    = 4;
  localparam int N     = 4096;
  localparam int CNT_W = $clog2(N + 1);
  localparam int T_PS  = 20000;
  localparam int DELAY = 100;   // delay element, default of the design
  localparam int DMM   = 100;   // delay match module, default of the design
  localparam int STAGE = 500;   // TGM stage, default of the design
  localparam int TOL   = 150;
  localparam int FAULT = 800;   // injected extra delay
  localparam int LIMIT = 400;   // pass/fail threshold above nominal

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_si = 1'b0, cfg_shift = 1'b0, cfg_update = 1'b0, cfg_so;
  logic test_wave = 1'b0, meas_start = 1'b0;
  logic [NP-1:0][BUS_LANES-1:0] norm_x, norm_e, rcv, drv_x, drv_e;
  logic [NP-1:0]                meas_busy, meas_done;
  logic [NP-1:0][CNT_W-1:0]     meas_count;
  int checks = 0, failures = 0;

  typedef enum int {
    M_NORMAL, M_DELAY, M_WIRE_DIAG, M_DRIVER_DIAG, M_RECEIVER_DIAG,
    M_CALIBRATION, M_INTRINSIC, M_INPHASE, M_OUTPHASE, M_XT_FASTER, M_XT_SLOWER, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  bdcm_top dut (.*);
  bus_model #(.NPORTS(NP), .LANES(BUS_LANES)) u_bus (.drv_x, .drv_e, .rcv);

  always #(1517 + $urandom_range(0, 100) - 50) clk = !clk;
  always #(T_PS / 2) test_wave = !test_wave;

  initial begin
    #(64'd40_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- configuration ------------------------------------------------------
  cfg_t cw [NP];

  task automatic clear_cfg();
    for (int p = 0; p < NP; p++) begin
      cw[p] = '0;
      cw[p].test_mode = 1'b1;
      cw[p].role      = ROLE_IDLE;
    end
  endtask

  task automatic set_source(input int p, input logic [BUS_LANES-1:0] en, input int ret);
    cw[p].role     = ROLE_SOURCE;
    cw[p].drv_en   = en;
    cw[p].ret_lane = LANE_W'(ret);
  endtask

  task automatic set_loop(input int p, input int src, input int dst);
    cw[p].role   = ROLE_LOOPBACK;
    cw[p].drv_en = BUS_LANES'(1) << dst;
    cw[p].lb_src = LANE_W'(src);
    cw[p].lb_dst = LANE_W'(dst);
  endtask

  // Last port's word first, each word MSB first.
  task automatic load_cfg();
    for (int p = NP - 1; p >= 0; p--)
      for (int b = CFG_W - 1; b >= 0; b--) begin
        @(negedge clk);
        cfg_si    = cw[p][b];
        cfg_shift = 1'b1;
      end
    @(negedge clk) cfg_shift = 1'b0;
    cfg_update = 1'b1;
    @(negedge clk) cfg_update = 1'b0;
    for (int p = 0; p < NP; p++)
      check(dut.cfg[p] == cw[p], $sformatf("configuration chain delivers port %0d's word", p));
    #(3 * T_PS);
  endtask

  task automatic measure(input int p, output real d_ps);
    int lat = 0;
    @(negedge clk) meas_start = 1'b1;
    @(negedge clk) meas_start = 1'b0;
    while (!meas_done[p]) begin
      @(negedge clk);
      lat++;
    end
    check(lat == N, $sformatf("measurement window %0d cycles", lat));
    d_ps = real'(meas_count[p]) * T_PS / (2.0 * N);
  endtask

  // ---- bus model reference -------------------------------------------------
  function automatic int one_way(input int from_p, input int to_p, input int l);
    return u_bus.drv_ps[from_p][l] + u_bus.wire_ps[l] + u_bus.rcv_ps[to_p][l];
  endfunction

  // Source port sp drives wire a, loop-back port lp returns it on wire b.
  function automatic int round_trip(input int sp, input int lp, input int a, input int b);
    return one_way(sp, lp, a) + one_way(lp, sp, b) - DELAY;
  endfunction

  task automatic clear_faults();
    for (int l = 0; l < BUS_LANES; l++) begin
      u_bus.wire_ps[l] = 1900;
      for (int p = 0; p < NP; p++) begin
        u_bus.drv_ps[p][l] = 400;
        u_bus.rcv_ps[p][l] = 400;
      end
    end
  endtask

  // One loop-back test; returns 1 when it fails (delay above nominal).
  task automatic loop_test(input int sp, input int lp, input int a, input int b, output bit fail);
    real d;
    clear_cfg();
    set_source(sp, BUS_LANES'(1) << a, b);
    set_loop(lp, a, b);
    load_cfg();
    measure(sp, d);
    check(d > round_trip(sp, lp, a, b) - TOL && d < round_trip(sp, lp, a, b) + TOL,
          $sformatf("port %0d wire %0d -> port %0d wire %0d: %0.1f ps, model %0d ps",
                    sp, a, lp, b, d, round_trip(sp, lp, a, b)));
    fail = (d > 2 * 2700 - DELAY + LIMIT);
  endtask

  // Crosstalk shift of one edge: neighbours' edges at times t_nb (all edges
  // of the wave, delayed by the DMM), n_nb neighbours switching.
  function automatic int xt_shift(input longint t_edge, input bit edge_rises, input int n_nb);
    int xt = 0;
    for (int m = -2; m <= 3; m++) begin
      longint t_a = longint'(m) * (T_PS / 2) + DMM;
      bit     a_rises = (m % 2 == 0);
      if (t_edge - t_a >= -u_bus.XT_AFTER_PS && t_edge - t_a <= u_bus.XT_BEFORE_PS)
        xt += n_nb * ((a_rises == edge_rises) ? -u_bus.XT_SAME_PS : u_bus.XT_OPP_PS);
    end
    return xt;
  endfunction

  // Expected delay change for tap i with polarity p: wire 1 is the victim
  // (neighbours 0 and 2), wire 3 the return wire (neighbour 2). Edge times
  // are relative to a rising edge of the wave at time 0.
  function automatic int expected_xt(input int i, input bit p);
    longint t_v = longint'(i) * STAGE;
    bit     rises = !p;
    int     x1 = xt_shift(t_v, rises, 2);
    longint t_r = t_v + one_way(0, 1, 1) + x1;
    int     x3 = xt_shift(t_r, rises, 1);
    return x1 + x3;
  endfunction

  // ---- test sequence ---------------------------------------------------------
  initial begin
    bit f1, f2, f3;
    real d, tau0, cal;
    norm_x = '0;
    norm_e = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    clear_faults();
    #(2 * T_PS);

    // 1. normal mode
    for (int i = 0; i < 8; i++) begin
      logic [BUS_LANES-1:0] v = BUS_LANES'($urandom);
      norm_e    = '0;
      norm_e[0] = '1;
      norm_x[0] = v;
      #10000;
      check(drv_e == norm_e && drv_x[0] == v && rcv[3] == v, "normal mode: port 0 data reaches port 3");
      seen[M_NORMAL]++;
    end
    norm_e = '0;

    // 2. delay measurement on every wire, paired with its neighbour
    for (int a = 0; a < BUS_LANES; a++) begin
      loop_test(0, 1, a, a ^ 1, f1);
      check(!f1, "fault-free bus passes");
      seen[M_DELAY]++;
    end

    // 3. wire delay fault on wire 1: tests 0->1 and 1->2 both fail, 2->3 passes
    u_bus.wire_ps[1] += FAULT;
    loop_test(0, 1, 0, 1, f1);
    loop_test(0, 1, 1, 2, f2);
    loop_test(0, 1, 2, 3, f3);
    check(f1 && f2 && !f3, "wire diagnosis: both tests through wire 1 fail, the other passes");
    if (f1 && f2) seen[M_WIRE_DIAG]++;
    clear_faults();

    // 4. driver delay fault: port 0's driver on wire 0. The wire tests say
    //    "driver or receiver"; loop-backs at ports 1 and 2 both fail.
    u_bus.drv_ps[0][0] += FAULT;
    loop_test(0, 1, 0, 1, f1);
    loop_test(0, 1, 1, 2, f2);
    check(f1 && !f2, "driver fault: only one of the adjacent wire tests fails");
    loop_test(0, 1, 0, 1, f1);
    loop_test(0, 2, 0, 2, f2);
    check(f1 && f2, "driver diagnosis: both loop-back ports see the slow driver");
    if (f1 && f2) seen[M_DRIVER_DIAG]++;
    clear_faults();

    // 5. receiver delay fault: port 0's receiver on wire 3; sources on wires
    //    1 and 2 looped back onto wire 3 at ports 1 and 2 both fail.
    u_bus.rcv_ps[0][3] += FAULT;
    loop_test(0, 1, 1, 3, f1);
    loop_test(0, 2, 2, 3, f2);
    loop_test(0, 1, 3, 1, f3);
    check(f1 && f2 && !f3, "receiver diagnosis: both returns on wire 3 fail, the driver of wire 3 passes");
    if (f1 && f2) seen[M_RECEIVER_DIAG]++;
    clear_faults();

    // 6. crosstalk. Port 0: neighbours 0 and 2 from the DMM, wire 1 from the
    //    TGM/TSM/PSM; port 1 loops wire 1 back on wire 3.
    // Step 1: calibration of every tap (the XOR reading folds above T/2).
    for (int i = 0; i <= int'(TGM_STAGES); i++) begin
      int t_i, e;
      t_i = i * STAGE;
      clear_cfg();
      set_source(0, '0, 3);
      cw[0].xt_en   = 1'b1;
      cw[0].cal     = 1'b1;
      cw[0].tap_sel = TAP_W'(i);
      load_cfg();
      measure(0, cal);
      e = (t_i % T_PS > T_PS / 2) ? T_PS - t_i % T_PS : t_i % T_PS;
      check(cal > e - TOL && cal < e + TOL, $sformatf("calibration tap %0d: %0.1f ps, expected %0d", i, cal, e));
      seen[M_CALIBRATION]++;
    end

    // Step 2: intrinsic delay, neighbours silent.
    clear_cfg();
    set_source(0, 4'b0010, 3);
    cw[0].xt_en    = 1'b1;
    cw[0].agg_mask = 4'b0101;
    set_loop(1, 1, 3);
    load_cfg();
    measure(0, tau0);
    check(tau0 > round_trip(0, 1, 1, 3) - TOL && tau0 < round_trip(0, 1, 1, 3) + TOL,
          $sformatf("intrinsic delay %0.1f ps", tau0));
    seen[M_INTRINSIC]++;

    // Steps 3 and 4: every tap, both polarities.
    for (int p = 0; p < 2; p++)
      for (int i = 0; i <= int'(TGM_STAGES); i++) begin
        real dt;
        int  e;
        clear_cfg();
        set_source(0, 4'b0111, 3);
        cw[0].xt_en    = 1'b1;
        cw[0].agg_mask = 4'b0101;
        cw[0].tap_sel  = TAP_W'(i);
        cw[0].polarity = 1'(p);
        set_loop(1, 1, 3);
        load_cfg();
        measure(0, d);
        dt = d - tau0;
        e  = expected_xt(i, 1'(p));
        check(dt > e - 2 * TOL && dt < e + 2 * TOL,
              $sformatf("P=%0d t_i=%0d ps: delta tau %0.1f ps, model %0d ps", p, i * STAGE, dt, e));
        if (p == 0) seen[M_INPHASE]++; else seen[M_OUTPHASE]++;
        if (dt < -300) seen[M_XT_FASTER]++;
        if (dt > 300)  seen[M_XT_SLOWER]++;
        if (i % 4 == 0) $display("profile P=%0d t_i=%5d ps  delta_tau=%7.1f ps", p, i * STAGE, dt);
      end

    for (int m = 0; m < int'(M_COUNT); m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-16s seen %0d times", me.name(), seen[m]);
      check(seen[m] > 0, $sformatf("mechanism %s exercised", me.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
