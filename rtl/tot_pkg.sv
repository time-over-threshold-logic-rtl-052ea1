// tot_pkg: types and constants shared by the Time-Over-Threshold (TOT) logic.
//
// The TOT measurement is one 32-bit word: T_course in bits 0-15 (whole TDC
// clock cycles, unsigned), T_fine in bits 16-23 (sub-cycle correction in delay
// taps, two's complement) and T_ref in bits 24-31 (one clock period in delay
// taps, unsigned). The duration is (T_course + T_fine / T_ref) clock periods.
// On the 16-bit link the word travels as a K28.0 header on both bytes followed
// by the low half and then the high half. K28.0 is the 8B/10B control
// character 0x1C; its byte value is standard 8B/10B, not taken from the
// description of this design. The slow-control bus (sc_req_t) is this
// design's own choice: a single-cycle write strobe and a combinational read.
package tot_pkg;

  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [7:0]  K28_0 = 8'h1C;          // TOT header character
  localparam logic [7:0]  K28_7 = 8'hFC;          // alignment character
  localparam logic [15:0] TOT_HEADER = {K28_0, K28_0};

  typedef struct packed {
    logic [7:0]        t_ref;     // bits 31:24
    logic signed [7:0] t_fine;    // bits 23:16
    logic [15:0]       t_course;  // bits 15:0
  } tot_word_t;

  // Slow-control request, one per clock.
  typedef struct packed {
    logic [31:0] addr;
    logic        wr;      // write strobe, one cycle
    logic [15:0] wdata;
  } sc_req_t;

  // Register offsets inside one TOT TX/RX channel block.
  localparam logic [3:0] OFF_STATUS   = 4'h0;
  localparam logic [3:0] OFF_MODE     = 4'h1;
  localparam logic [3:0] OFF_PULSE    = 4'h2;
  localparam logic [3:0] OFF_TEST_LSB = 4'h3;
  localparam logic [3:0] OFF_TEST_MSB = 4'h4;
  localparam logic [3:0] OFF_RX_LSB   = 4'h5;
  localparam logic [3:0] OFF_RX_MSB   = 4'h6;

endpackage
