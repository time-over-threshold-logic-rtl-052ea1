// tdc_control: Control Proc of the TDC. Derives every control signal from a
// short history of the synchronised inhibit signal.
//
// Inputs s2, s3, s4 are the synchronised inhibit after the 2nd, 3rd and 4th
// flip-flop behind the first tap of the inhibit chain. In the cycle s2 is high
// and s3 low (rising edge) ld_rise is raised; in the cycle s2 is low and s3
// high (falling edge) ld_fall (T_falling and T_ref, captured together) and
// ld_course are raised. These pulses are combinational so that, with two-stage
// encoders, the captured values belong to the clock edges that first saw
// inhibit high (CLK_r) and low (CLK_f). One cycle later (s3 low, s4 high)
// tot_valid is raised for one cycle, when the capture registers hold the new
// result, but only if the pulse lasted at least MIN_TICKS cycles, so that
// 10 ns sync pulses on the same line produce no TOT packet.
// The signals and the 4-tick (20 ns) minimum follow the description; their
// exact cycle timing and the use of the T_course count for the minimum are
// this design's choices. The block is purely combinational; its inputs are
// registered in the synchroniser and the capture registers.
module tdc_control #(
  parameter int unsigned W         = 16,
  parameter int unsigned MIN_TICKS = 4
) (
  input  logic         rst,
  input  logic         s2,
  input  logic         s3,
  input  logic         s4,
  input  logic [W-1:0] t_course,   // captured T_course
  output logic         ld_rise,
  output logic         ld_fall,
  output logic         ld_course,
  output logic         tot_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  assign ld_rise   = s2 && !s3;
  assign ld_fall   = !s2 && s3;
  assign ld_course = !s2 && s3;

  assign tot_valid = !rst && !s3 && s4 && (t_course >= W'(MIN_TICKS));

endmodule
