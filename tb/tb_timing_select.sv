// tb_timing_select -- checks the TSM multiplexer for every select value,
// including out-of-range ones, with random tap patterns.
module tb_timing_select;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int unsigned STAGES = 48;
  localparam int unsigned SEL_W  = $clog2(STAGES + 1);
  logic [STAGES:0]  taps;
  logic [SEL_W-1:0] sel;
  logic             y;
  int checks = 0, failures = 0;

  timing_select dut (.taps, .sel, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      taps = {$urandom, $urandom};
      for (int s = 0; s < (1 << SEL_W); s++) begin
        logic exp;
        sel = SEL_W'(s);
        #10;
        exp = (s > STAGES) ? taps[STAGES] : taps[s];
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL sel=%0d y=%b exp=%b", s, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
