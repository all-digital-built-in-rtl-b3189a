// tb_phase_diff_counter -- drives a known random bit stream into the counter
// (changing between clock edges) and checks k and the window length.
//
// The counter samples its input at each rising edge and counts, two edges
// later, the samples that were 1. For a start seen at edge 0 the window holds
// the inputs sampled at edges -1 .. N-2, and done rises at edge N. The
// reference model below records the input at every edge and sums that range.
module tb_phase_diff_counter;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int unsigned N     = 4096;
  localparam int unsigned CNT_W = $clog2(N + 1);
  logic             clk = 1'b0, rst_n = 1'b0, count_in = 1'b0, start = 1'b0;
  logic             busy, done;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;
  int edge_no = 0;
  logic hist [0:65535];

  phase_diff_counter dut (.*);

  always #1000 clk = !clk;
  always @(posedge clk) begin
    hist[edge_no] = count_in;
    edge_no++;
  end

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int density);
    int start_edge, exp_k, lat;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start_edge = edge_no - 1;  // the rising edge that saw start
    start = 1'b0;
    lat = 0;
    while (!done) begin
      count_in = ($urandom_range(0, 99) < density);
      @(posedge clk);
      lat++;
      #1;
      if (lat > N + 10) break;
    end
    exp_k = 0;
    for (int e = start_edge - 1; e <= start_edge + int'(N) - 2; e++) exp_k += int'(hist[e]);
    checks += 2;
    if (int'(count) != exp_k) begin
      failures++;
      $display("FAIL density %0d: k=%0d expected %0d", density, count, exp_k);
    end
    if (lat != int'(N)) begin
      failures++;
      $display("FAIL window: done after %0d edges, expected %0d", lat, N);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run(0);
    run(100);
    run(50);
    run(13);
    run(87);
    // restart in the middle of a window
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (100) @(negedge clk);
    run(30);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
