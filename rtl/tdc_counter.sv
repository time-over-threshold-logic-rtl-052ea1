// tdc_counter: the T_course counter of the TDC. Counts the whole TDC clock
// cycles for which the synchronised inhibit (inh) is high.
//
// On the first cycle inh is high (inh high, inh_d low) the count restarts at
// 1; it then increments each further high cycle and saturates at all ones.
// When inh falls the count is held, so in the cycle the falling edge is seen
// (inh low, inh_d high) count equals the number of high cycles. inh_d is inh
// one cycle later, from the same synchroniser pipeline. A counter clocked at
// 200 MHz is what the description gives; the restart/hold scheme, saturation
// and the 16-bit width (the T_course field) are this design's choices.
module tdc_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         inh,
  input  logic         inh_d,
  output logic [W-1:0] count
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (rst)                 count <= '0;
    else if (inh && !inh_d)  count <= W'(1);
    else if (inh && count != '1) count <= count + W'(1);
  end
endmodule
