// tb_delay_meas_module -- measures known delays between two square waves.
//
// sig_a is a 20 ns square wave, sig_b the same wave delayed by d. The sampling
// clock has a 3.001 ns period plus up to +-50 ps of random jitter per half
// cycle, so the samples fall at effectively random phases of the wave. The
// expected count is k = N * 2d / T; the check allows 1% of N (100 ps).
module tb_delay_meas_module;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int unsigned N      = 4096;
  localparam int unsigned CNT_W  = $clog2(N + 1);
  localparam int          T_PS   = 20000;
  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic             sig_a = 1'b0, sig_b;
  logic             busy, done;
  logic [CNT_W-1:0] count;
  int               d_ps = 0;
  int checks = 0, failures = 0;

  delay_meas_module dut (.*);

  always #(1500 + $urandom_range(0, 100) - 50) clk = !clk;
  always #(T_PS / 2) sig_a = !sig_a;
  always @(sig_a) sig_b <= #(d_ps) sig_a;

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int d, input int tol_ps);
    real meas;
    d_ps = d;
    #(3 * T_PS);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    meas = real'(count) * T_PS / (2.0 * N);
    checks++;
    if (meas < d - tol_ps || meas > d + tol_ps) begin
      failures++;
      $display("FAIL d=%0d ps measured %0.1f ps (k=%0d)", d, meas, count);
    end else $display("d=%0d ps measured %0.1f ps", d, meas);
  endtask

  initial begin
    sig_b = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    measure(0, 100);
    measure(1900, 100);
    measure(2700, 100);
    measure(3900, 100);
    measure(7300, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
