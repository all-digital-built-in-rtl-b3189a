// tb_timing_gen_chain -- sends one rising and one falling edge through the
// TGM and checks that tap i switches i * 500 ps after the input.
module tb_timing_gen_chain;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int unsigned STAGES   = 48;
  localparam longint      STAGE_PS = 500;
  logic            a = 1'b0;
  logic [STAGES:0] taps;
  longint          t_in;
  longint          t_tap [STAGES+1];
  int checks = 0, failures = 0;

  timing_gen_chain dut (.a, .taps);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [STAGES:0] taps_q = '0;
  always @(taps) begin
    for (int i = 0; i <= STAGES; i++)
      if (taps[i] != taps_q[i]) t_tap[i] = $time;
    taps_q = taps;
  end

  initial begin
    #1000;
    for (int e = 0; e < 2; e++) begin
      a = !a;
      t_in = $time;
      #(STAGE_PS * (STAGES + 2));
      for (int i = 0; i <= STAGES; i++) begin
        checks++;
        if (taps[i] !== a || (t_tap[i] - t_in) != STAGE_PS * i) begin
          failures++;
          $display("FAIL tap %0d at %0d ps, expected %0d", i, t_tap[i] - t_in, STAGE_PS * i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
