// tb_port_mux -- random check of the normal/test multiplexer of a port.
module tb_port_mux;
  import bdcm_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;
  logic                 test_mode;
  logic [BUS_LANES-1:0] norm_x, norm_e, test_x, test_e, drv_x, drv_e;
  int checks = 0, failures = 0;

  port_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      {norm_x, norm_e, test_x, test_e} = 16'($urandom);
      test_mode = 1'($urandom);
      #10;
      checks += 2;
      if (drv_x !== (test_mode ? test_x : norm_x)) begin failures++; $display("FAIL x"); end
      if (drv_e !== (test_mode ? test_e : norm_e)) begin failures++; $display("FAIL e"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
