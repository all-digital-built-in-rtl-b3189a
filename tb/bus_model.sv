// bus_model -- behavioural model of the bus under test (drivers, wires,
// receivers) for simulation only.
//
// Each wire is driven by whichever port enables its driver (two-state: an
// undriven wire reads 0). Every edge reaches the receivers of all ports after
// the driver delay of the driving port, the wire delay and the receiving
// port's receiver delay; each can be raised to inject a delay fault.
// Crosstalk: when a neighbouring wire switches within XT_BEFORE_PS before to
// XT_AFTER_PS after an edge, that edge is sped up by XT_SAME_PS (neighbour
// switching the same way) or slowed down by XT_OPP_PS (the other way), per
// neighbour. The defaults give an intrinsic one-way delay of 2.7 ns and a
// range of -0.8 ns to +1.2 ns (1.9 ns to 3.9 ns one way) with both
// neighbours switching.
module bus_model #(
  parameter int NPORTS = 4,
  parameter int LANES  = 4
) (
  input  logic [NPORTS-1:0][LANES-1:0] drv_x,
  input  logic [NPORTS-1:0][LANES-1:0] drv_e,
  output logic [NPORTS-1:0][LANES-1:0] rcv
);
  timeunit 1ps;
  timeprecision 1ps;

  int XT_SAME_PS   = 400;
  int XT_OPP_PS    = 600;
  int XT_BEFORE_PS = 2000;
  int XT_AFTER_PS  = 1500;
  int drv_ps  [NPORTS][LANES];
  int rcv_ps  [NPORTS][LANES];
  int wire_ps [LANES];

  logic [LANES-1:0] w_in;
  longint           last_t   [LANES];
  logic             last_dir [LANES];
  logic             rcv_r    [NPORTS][LANES];

  initial begin
    for (int l = 0; l < LANES; l++) begin
      wire_ps[l]  = 1900;
      last_t[l]   = -1000000;
      last_dir[l] = 1'b0;
      for (int p = 0; p < NPORTS; p++) begin
        drv_ps[p][l] = 400;
        rcv_ps[p][l] = 400;
        rcv_r[p][l]  = 1'b0;
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      w_in[l] = 1'b0;
      for (int p = 0; p < NPORTS; p++) w_in[l] |= drv_e[p][l] & drv_x[p][l];
    end
  end

  always_comb
    for (int p = 0; p < NPORTS; p++)
      for (int l = 0; l < LANES; l++) rcv[p][l] = rcv_r[p][l];

  function automatic int driver_of(input int l);
    for (int p = 0; p < NPORTS; p++) if (drv_e[p][l]) return p;
    return 0;
  endfunction

  // Every wire edge is queued, decided XT_AFTER_PS later (when all
  // neighbour edges that can affect it are known) and then queued once more
  // per receiving port with its arrival time.
  typedef struct {
    longint t;
    logic   v;
    int     p;
  } ev_t;
  ev_t  pend [LANES][$];
  ev_t  arr  [NPORTS][LANES][$];
  event kick;

  logic [LANES-1:0] w_q = '0;
  always @(w_in) begin
    for (int l = 0; l < LANES; l++) begin
      if (w_in[l] != w_q[l]) begin
        ev_t e;
        e.t = $time;
        e.v = w_in[l];
        e.p = driver_of(l);
        last_t[l]   = e.t;
        last_dir[l] = e.v;
        pend[l].push_back(e);
      end
    end
    w_q = w_in;
    ->kick;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_wire
    initial forever begin
      ev_t e;
      int  xt;
      while (pend[l].size() == 0) @(kick);
      e = pend[l].pop_front();
      if (e.t + XT_AFTER_PS > $time) #(e.t + XT_AFTER_PS - $time);
      xt = 0;
      for (int n = l - 1; n <= l + 1; n += 2) begin
        if (n < 0 || n >= LANES) continue;
        if (last_t[n] >= e.t - XT_BEFORE_PS && last_t[n] <= e.t + XT_AFTER_PS)
          xt += (last_dir[n] == e.v) ? -XT_SAME_PS : XT_OPP_PS;
      end
      for (int q = 0; q < NPORTS; q++) begin
        ev_t a;
        a.t = e.t + drv_ps[e.p][l] + wire_ps[l] + xt + rcv_ps[q][l];
        a.v = e.v;
        a.p = e.p;
        arr[q][l].push_back(a);
      end
      ->kick;
    end
    for (genvar q = 0; q < NPORTS; q++) begin : g_rcv
      initial forever begin
        ev_t a;
        while (arr[q][l].size() == 0) @(kick);
        a = arr[q][l].pop_front();
        if (a.t > $time) #(a.t - $time);
        rcv_r[q][l] = a.v;
      end
    end
  end
endmodule
