// tb_loopback_module -- every source/destination wire pair with random
// receiver values: only the destination wire carries the source wire's value.
module tb_loopback_module;
  import bdcm_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  logic [BUS_LANES-1:0] rcv, drv_x;
  logic [LANE_W-1:0]    lb_src, lb_dst;
  int checks = 0, failures = 0;

  loopback_module dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < BUS_LANES; s++)
      for (int d = 0; d < BUS_LANES; d++)
        for (int r = 0; r < (1 << BUS_LANES); r++) begin
          logic [BUS_LANES-1:0] exp;
          lb_src = LANE_W'(s);
          lb_dst = LANE_W'(d);
          rcv    = BUS_LANES'(r);
          #10;
          exp    = '0;
          exp[d] = rcv[s];
          checks++;
          if (drv_x !== exp) begin
            failures++;
            $display("FAIL src=%0d dst=%0d rcv=%b drv_x=%b exp=%b", s, d, rcv, drv_x, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
