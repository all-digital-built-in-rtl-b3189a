// delay_meas_module -- all-digital delay measurement module.
//
// The phase detector (PD) is an exclusive-OR of the reference wave sig_a and
// the returned wave sig_b; its output is high for the time by which sig_b
// lags sig_a, twice per period. The phase difference counter samples it
// N_SAMPLES times with clk, which must be asynchronous to the waves, and
// returns k. For a test wave of period T the delay is d = k * T / (2 * n)
// (valid for d below T/2). The method needs no filter or converter: only the
// XOR gate and a counter.
//
// Timing: start is a one-cycle pulse; done rises N_SAMPLES clock edges after
// the edge that saw it (see phase_diff_counter).
module delay_meas_module #(
  parameter int unsigned N_SAMPLES = 4096,
  localparam int unsigned CNT_W    = $clog2(N_SAMPLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sig_a,
  input  logic             sig_b,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1ps;

  logic pd;

  assign pd = sig_a ^ sig_b;  // phase detector

  phase_diff_counter #(.N_SAMPLES(N_SAMPLES)) u_pdc (
    .clk, .rst_n, .count_in(pd), .start, .busy, .done, .count
  );
endmodule
