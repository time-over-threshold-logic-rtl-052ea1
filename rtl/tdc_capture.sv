// tdc_capture: Capture Proc of the TDC. Registers the encoder outputs and
// the cycle count at the moments Control Proc selects, and forms the 32-bit
// TOT word.
//
//  ld_rise  : T_rising  <= inh_count (taps high at CLK_r, the first clock edge
//             to see inhibit high)
//  ld_fall  : T_falling  = TAPS - inh_count (taps already low at CLK_f, the
//             first edge to see inhibit low); T_fine <= T_rising - T_falling
//             (signed); T_ref <= ref_count
//  ld_course: T_course <= count
// tot_data = {T_ref, T_fine, T_course} and is stable from the cycle after the
// falling-edge loads until the next falling edge. The duration of the pulse is
// (T_course + T_fine / T_ref) TDC clock periods.
// The fields, the formulas and the capture points follow the description;
// register reset values and the separate T_rising holding register are this
// design's choices.
module tdc_capture
  import tot_pkg::*;
#(
  parameter int unsigned TAPS = 126,
  parameter int unsigned CW   = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ld_rise,
  input  logic          ld_fall,
  input  logic          ld_course,
  input  logic [7:0]    inh_count,
  input  logic [7:0]    ref_count,
  input  logic [CW-1:0] count,
  output tot_word_t     tot_data
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [7:0] t_rising;
  logic [7:0] t_falling;

  assign t_falling = 8'(TAPS) - inh_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      t_rising <= '0;
      tot_data <= '0;
    end else begin
      if (ld_rise)   t_rising          <= inh_count;
      if (ld_fall) begin
        tot_data.t_fine <= $signed(t_rising - t_falling);
        tot_data.t_ref  <= ref_count;
      end
      if (ld_course) tot_data.t_course <= 16'(count);
    end
  end
endmodule
