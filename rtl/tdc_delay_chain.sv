// tdc_delay_chain: behavioural model, not synthesizable logic. It stands for
// a delay chain built from the FPGA's fast-carry chain as a relationally
// placed macro: N asynchronous delay elements in series, each tapped, every
// tap sampled by a flip-flop on the rising edge of the TDC clock.
//
// How the model works: it records the last HIST_DEPTH transitions of sig_in
// with their times. At each rising clk edge at time t, tap i (0 = nearest the
// input) takes the value sig_in had at t - CLK_SKEW_PS - (i+1)*TAU_PS, i.e. the
// value that has just propagated through i+1 elements. taps is registered, so
// it changes only on the clock edge. TAU_PS defaults to 5000/105 ps, one
// 5 ns TDC period over 105 elements (the cold-device figure). CLK_SKEW_PS
// models the clock distribution delay between the chain's entry and its
// sampling flip-flops; it is zero for the inhibit chain and is chosen for the
// reference chain so that the clock's transitions land mid-window.
//
// Interface: sig_in (the asynchronous inhibit signal, or the TDC clock for
// the reference chain), clk (the TDC clock), taps[N-1:0] (registered taps).
// The chain lengths (126, 140) and the element delay follow the description;
// the skew and the recording scheme are the model's own.
module tdc_delay_chain #(
  parameter int unsigned N           = 126,
  parameter real         TAU_PS      = 47.619,
  parameter real         CLK_SKEW_PS = 0.0,
  parameter int unsigned HIST_DEPTH  = 8
) (
  input  logic         clk,
  input  logic         sig_in,
  output logic [N-1:0] taps
);
  timeunit 1ps;
  timeprecision 1ps;


  real  edge_t [HIST_DEPTH];     // time of each recorded transition
  logic edge_v [HIST_DEPTH];     // level after that transition
  int   wr_ptr;
  logic level0;                  // level before the oldest kept transition

  initial begin
    level0 = 1'b0;
    wr_ptr = 0;
    for (int k = 0; k < HIST_DEPTH; k++) begin
      edge_t[k] = -1.0e12;
      edge_v[k] = 1'b0;
    end
    taps = '0;
  end

  always @(sig_in) begin
    edge_t[wr_ptr] = $realtime;
    edge_v[wr_ptr] = sig_in;
    wr_ptr = (wr_ptr + 1) % HIST_DEPTH;
  end

  // Level of sig_in at time ts, from the recorded transitions.
  function automatic logic level_at(real ts);
    real  best_t;
    logic v;
    best_t = -2.0e12;
    v      = level0;
    for (int k = 0; k < HIST_DEPTH; k++) begin
      if (edge_t[k] <= ts && edge_t[k] > best_t) begin
        best_t = edge_t[k];
        v      = edge_v[k];
      end
    end
    return v;
  endfunction

  always @(posedge clk) begin
    real now;
    now = $realtime;
    for (int i = 0; i < N; i++)
      taps[i] <= level_at(now - CLK_SKEW_PS - real'(i + 1) * TAU_PS);
  end

endmodule
