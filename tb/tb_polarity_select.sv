// tb_polarity_select -- exhaustive check of the polarity select XOR.
module tb_polarity_select;
  timeunit 1ps;
  timeprecision 1ps;
  logic a, p, y;
  int checks = 0, failures = 0;

  polarity_select dut (.a, .p, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {p, a} = 2'(i);
      #10;
      checks++;
      // P = 0: same polarity; P = 1: inverted.
      if (y !== (p ? !a : a)) begin
        failures++;
        $display("FAIL a=%b p=%b y=%b", a, p, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
