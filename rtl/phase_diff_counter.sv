// phase_diff_counter -- phase difference counter (PDC) of the digital delay
// measurement.
//
// The phase detector output is a square wave whose duty cycle is the phase
// difference phi between the two compared signals divided by pi. Sampling it
// at n instants that are uncorrelated with it gives k ones, with
// k = n * phi / pi. This block takes those n samples with its clock, which is
// asynchronous to the test wave, and counts the ones.
//
// The asynchronous input passes through a two-flop synchronizer (the first
// flop is the sampling point; the second only guards against metastability,
// which is this design's addition). A one-cycle start pulse clears k and opens
// a window of exactly N_SAMPLES clock cycles; busy is high during it. The
// clock edge that takes the last sample also sets done, so done rises
// N_SAMPLES clock edges after the edge that saw start, and count holds k
// until the next start. A start during a window restarts it. The window
// length n is not fixed by the method; 4096 is this design's default.
module phase_diff_counter #(
  parameter int unsigned N_SAMPLES = 4096,
  localparam int unsigned CNT_W    = $clog2(N_SAMPLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             count_in,   // phase detector output, asynchronous
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1ps;

  logic             smp, smp_q;
  logic [CNT_W-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp   <= 1'b0;
      smp_q <= 1'b0;
    end else begin
      smp   <= count_in;
      smp_q <= smp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      count     <= '0;
      remaining <= '0;
    end else if (start) begin
      busy      <= 1'b1;
      done      <= 1'b0;
      count     <= '0;
      remaining <= CNT_W'(N_SAMPLES);
    end else if (busy) begin
      count     <= count + CNT_W'(smp_q);
      remaining <= remaining - 1'b1;
      if (remaining == CNT_W'(1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  a_busy_done_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
  a_count_bounded: assert property (@(posedge clk) disable iff (!rst_n) count <= CNT_W'(N_SAMPLES));
endmodule
