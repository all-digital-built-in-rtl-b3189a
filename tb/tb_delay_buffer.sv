// tb_delay_buffer -- measures the time from each input edge to the matching
// output edge and checks it equals the nominal 100 ps.
module tb_delay_buffer;
  timeunit 1ps;
  timeprecision 1ps;
  localparam longint EXP_PS = 100;
  logic a = 1'b0, y;
  longint t_in;
  int checks = 0, failures = 0;

  delay_buffer dut (.a, .y);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < 20; i++) begin
      a = !a;
      t_in = $time;
      @(y);
      checks++;
      if (($time - t_in) != EXP_PS || y !== a) begin
        failures++;
        $display("FAIL edge %0d delay %0d ps", i, $time - t_in);
      end
      #(1000 + $urandom_range(0, 500));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
