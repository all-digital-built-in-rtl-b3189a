// tb_bdcm_module -- one port's BDCM module: configuration chain, normal mode,
// idle, loop-back and source roles, and a measurement that starts only in the
// source role.
module tb_bdcm_module;
  import bdcm_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int unsigned N     = 4096;
  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int          T_PS  = 20000;
  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 cfg_si = 1'b0, cfg_shift = 1'b0, cfg_update = 1'b0, cfg_so;
  logic                 wave = 1'b0, meas_start = 1'b0;
  logic [BUS_LANES-1:0] norm_x, norm_e, rcv, drv_x, drv_e;
  logic                 busy, done;
  logic [CNT_W-1:0]     count;
  cfg_t                 cfg;
  int checks = 0, failures = 0;

  bdcm_module dut (.*);

  always #(1500 + $urandom_range(0, 100) - 50) clk = !clk;
  always #(T_PS / 2) wave = !wave;

  initial begin
    #2000000000;
    failures++;
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

  // Shift a word in MSB first and return the bits that came out on cfg_so.
  task automatic load(input cfg_t w, output logic [CFG_W-1:0] out, input bit update = 1'b1);
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk);
      cfg_si    = w[b];
      cfg_shift = 1'b1;
      out[b]    = cfg_so;
      @(posedge clk);
    end
    @(negedge clk) cfg_shift = 1'b0;
    if (update) begin
      cfg_update = 1'b1;
      @(negedge clk) cfg_update = 1'b0;
    end
  endtask

  initial begin
    cfg_t w1, w2;
    logic [CFG_W-1:0] so;
    rcv = '0;
    norm_x = '0;
    norm_e = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // After reset: normal mode.
    check(cfg == '0, "reset configuration");
    for (int i = 0; i < 20; i++) begin
      {norm_x, norm_e} = 8'($urandom);
      #100;
      check(drv_x == norm_x && drv_e == norm_e, "normal mode passes the logic's signals");
    end

    // Chain: shift without update leaves the active word alone; the bits that
    // come out are the previous contents.
    w1 = cfg_t'({$urandom, $urandom});
    w2 = cfg_t'({$urandom, $urandom});
    load(w1, so, 1'b0);
    check(cfg == '0, "no update, configuration unchanged");
    load(w2, so, 1'b1);
    check(so == w1, "chain output is the previous word");
    check(cfg == w2, "update activates the shifted word");

    // Idle role in test mode: no driver enabled.
    w1 = '0;
    w1.test_mode = 1'b1;
    w1.role      = ROLE_IDLE;
    w1.drv_en    = '1;
    norm_e       = '1;
    load(w1, so);
    #100;
    check(drv_e == '0, "idle role disables the drivers");

    // Loop-back role: wire 1 back onto wire 3.
    w1.role   = ROLE_LOOPBACK;
    w1.drv_en = 4'b1000;
    w1.lb_src = 2'd1;
    w1.lb_dst = 2'd3;
    load(w1, so);
    for (int i = 0; i < 8; i++) begin
      rcv = 4'($urandom);
      #100;
      check(drv_e == 4'b1000 && drv_x == {rcv[1], 3'b000}, "loop-back routes wire 1 to wire 3");
    end
    @(negedge clk) meas_start = 1'b1;
    @(negedge clk) meas_start = 1'b0;
    repeat (5) @(negedge clk);
    check(!busy, "no measurement outside the source role");

    // Source role: wave on the enabled driver, receiver 2 returns it 2 ns later.
    w1.role     = ROLE_SOURCE;
    w1.drv_en   = 4'b0100;
    w1.ret_lane = 2'd2;
    load(w1, so);
    fork
      forever @(drv_x[2]) rcv[2] <= #2000 drv_x[2];
    join_none
    for (int i = 0; i < 8; i++) begin
      #($urandom_range(500, 3000));
      check(drv_e == 4'b0100 && drv_x == {4{wave}}, "source drives the wave");
    end
    #(2 * T_PS);
    @(negedge clk) meas_start = 1'b1;
    @(negedge clk) meas_start = 1'b0;
    check(busy, "measurement starts in the source role");
    wait (done);
    begin
      real meas;
      meas = real'(count) * T_PS / (2.0 * N);
      check(meas > 1900 - 100 && meas < 1900 + 100, $sformatf("source measurement %0.1f ps", meas));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
