// tot_tdc: the TOT TDC. Measures how long the asynchronous inhibit input was
// high, to a fraction of the 5 ns TDC clock period, by interpolation.
//
// Structure
//  * Delay chain 126 carries inhibit; its registered taps go to the Inh
//    Encoder (count of high taps). Read at CLK_r, the first clock edge that
//    sees inhibit high, the count is T_rising (time from the rising edge of
//    inhibit to CLK_r); read at CLK_f it is 126 minus T_falling (time from
//    the falling edge to CLK_f).
//  * Tap 0 of that chain, already registered inside the chain, is passed
//    through four more flip-flops (s1..s4) to limit metastability and to keep
//    a history of inhibit. s2 drives the T_course counter; s2, s3 and s4 drive
//    Control Proc.
//  * Delay chain 140 carries the TDC clock; the Ref Encoder turns two windows
//    of its taps into T_ref, one clock period in delay elements.
//  * Capture Proc stores T_rising at the rising edge and T_fine, T_ref and
//    T_course at the falling edge; tot_valid is then raised for one cycle if
//    inhibit lasted at least MIN_TICKS cycles.
// Output: tot_data = {T_ref[7:0], T_fine[7:0] signed, T_course[15:0]}, valid
// while tot_valid is high. tot_valid is high for the one cycle that starts
// three clock edges after CLK_f.
//
// The structure, chain lengths, field layout and the 4-tick minimum follow the
// description; the encoder pipelining, the cycle timing, the reference
// windows and the model delays are this design's choices. The delay chains
// are behavioural models of placed carry-chain macros. TAU_PS (element delay) and
// REF_SKEW_PS (clock-to-chain skew) only set those models.
module tot_tdc
  import tot_pkg::*;
#(
  parameter int unsigned INH_TAPS    = 126,
  parameter int unsigned REF_TAPS    = 140,
  parameter int unsigned MIN_TICKS   = 4,
  parameter real         TAU_PS      = 47.619,
  parameter real         REF_SKEW_PS = 2666.7
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      inhibit,
  output tot_word_t tot_data,
  output logic      tot_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [INH_TAPS-1:0] inh_taps;
  logic [REF_TAPS-1:0] ref_taps;
  logic [7:0]  inh_count, ref_count;
  logic [15:0] count;
  logic        s1, s2, s3, s4;
  logic        ld_rise, ld_fall, ld_course;

  tdc_delay_chain #(.N(INH_TAPS), .TAU_PS(TAU_PS), .CLK_SKEW_PS(0.0)) u_chain126 (
    .clk(clk), .sig_in(inhibit), .taps(inh_taps));

  tdc_delay_chain #(.N(REF_TAPS), .TAU_PS(TAU_PS), .CLK_SKEW_PS(REF_SKEW_PS)) u_chain140 (
    .clk(clk), .sig_in(clk), .taps(ref_taps));

  tdc_inh_encoder #(.N(INH_TAPS)) u_inh_enc (
    .clk(clk), .taps(inh_taps), .count(inh_count));

  tdc_ref_encoder #(.N(REF_TAPS)) u_ref_enc (
    .clk(clk), .taps(ref_taps), .t_ref(ref_count));

  // Synchroniser and history of inhibit, from the first clocked tap.
  always_ff @(posedge clk) begin
    if (rst) {s1, s2, s3, s4} <= '0;
    else begin
      s1 <= inh_taps[0];
      s2 <= s1;
      s3 <= s2;
      s4 <= s3;
    end
  end

  tdc_counter #(.W(16)) u_counter (
    .clk(clk), .rst(rst), .inh(s2), .inh_d(s3), .count(count));

  tdc_control #(.W(16), .MIN_TICKS(MIN_TICKS)) u_control (
    .rst(rst), .s2(s2), .s3(s3), .s4(s4), .t_course(tot_data.t_course),
    .ld_rise(ld_rise), .ld_fall(ld_fall), .ld_course(ld_course),
    .tot_valid(tot_valid));

  tdc_capture #(.TAPS(INH_TAPS), .CW(16)) u_capture (
    .clk(clk), .rst(rst), .ld_rise(ld_rise), .ld_fall(ld_fall),
    .ld_course(ld_course), .inh_count(inh_count), .ref_count(ref_count),
    .count(count), .tot_data(tot_data));

endmodule
