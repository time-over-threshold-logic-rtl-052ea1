// tdc_ref_encoder: Ref Encoder of the TDC. Measures one TDC clock period in
// delay elements from the sampled taps of the reference delay chain, which
// carries the TDC clock itself.
//
// Only two fixed windows of taps are examined, W1 = [W1_LO, W1_HI] and
// W2 = [W2_LO, W2_HI], each placed where one of two consecutive like
// transitions of the clock waveform is expected along the chain. Within each
// window the high taps lie between the transition and the window's end, so
// their number T1 (resp. T2) locates the transition. With the fixed window
// offset T_woff = W2_HI - W1_HI the period is
//     T_ref = T_woff + T1 - T2.
// This measures a full period, so it does not depend on the clock's duty
// cycle. Two register stages (window counts, then the sum): t_ref belongs to
// the taps presented two clock edges earlier, the same latency as the
// inhibit encoder. The formula, the two-window method and the 8-bit width
// follow the description; the window positions are not given and are this
// design's choice for a 140-tap chain with about 105 taps per period, with the
// transitions placed near taps 17 and 122.
module tdc_ref_encoder #(
  parameter int unsigned N     = 140,
  parameter int unsigned W1_LO = 0,
  parameter int unsigned W1_HI = 34,
  parameter int unsigned W2_LO = 105,
  parameter int unsigned W2_HI = 139,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic [N-1:0]     taps,
  output logic [OUT_W-1:0] t_ref
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TWOFF = W2_HI - W1_HI;

  logic [OUT_W-1:0] t1, t2;

  always_ff @(posedge clk) begin
    logic [OUT_W-1:0] c1, c2;
    c1 = '0;
    c2 = '0;
    for (int i = W1_LO; i <= W1_HI; i++) c1 = c1 + OUT_W'(taps[i]);
    for (int i = W2_LO; i <= W2_HI; i++) c2 = c2 + OUT_W'(taps[i]);
    t1 <= c1;
    t2 <= c2;
  end

  always_ff @(posedge clk)
    t_ref <= OUT_W'(TWOFF) + t1 - t2;

endmodule
