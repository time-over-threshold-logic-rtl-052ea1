// tdc_inh_encoder: Inh Encoder of the TDC. Turns the N sampled taps of the
// inhibit delay chain into an 8-bit binary count of the taps that are high,
// i.e. how long (in delay elements) inhibit had been high before the clock
// edge that sampled them.
//
// It counts every high tap rather than locating a single 0/1 boundary, so an
// isolated "bubble" in the thermometer code costs one count rather than a
// large error. Two register stages: stage 1 counts groups of GROUP taps,
// stage 2 adds the group counts. count therefore belongs to the taps presented
// two clock edges earlier (LATENCY = 2). The count-of-asserted-taps function
// and the 8-bit width follow the description; the pipelining is this design's
// own choice for a 200 MHz clock.
module tdc_inh_encoder #(
  parameter int unsigned N     = 126,
  parameter int unsigned GROUP = 16,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic [N-1:0]     taps,
  output logic [OUT_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NG = (N + GROUP - 1) / GROUP;
  localparam int unsigned GW = $clog2(GROUP + 1);

  logic [GW-1:0] grp_cnt [NG];

  always_ff @(posedge clk) begin
    for (int g = 0; g < NG; g++) begin
      logic [GW-1:0] c;
      c = '0;
      for (int b = 0; b < GROUP; b++)
        if (g * GROUP + b < N) c = c + GW'(taps[g * GROUP + b]);
      grp_cnt[g] <= c;
    end
  end

  always_ff @(posedge clk) begin
    logic [OUT_W-1:0] s;
    s = '0;
    for (int g = 0; g < NG; g++) s = s + OUT_W'(grp_cnt[g]);
    count <= s;
  end

endmodule
