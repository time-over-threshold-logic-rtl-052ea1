// agata_tot_top: the Time-Over-Threshold logic of one AGATA Digitizer and the
// receivers in the Pre-Processor at the far end of its two optical links.
//
// Digitizer side (clock clk, the 200 MHz TDC clock, taken here to clock the
// whole Digitizer TOT logic):
//  * one TOT TDC measures each inhibit pulse from the pre-amplifier;
//  * per channel (core 1, core 2) a TOT Transmitter inserts the same TDC
//    result into that channel's RocketIO stream (rkt_* in, tx* out);
//  * core 1 also has a TOT Receiver on its RocketIO loopback path (lb_* in and
//    out), for diagnostics; its last word is readable over slow control;
//  * per channel a slow-control register block (core 1 at 0x50..0x56, core 2
//    at 0x60..0x66) and the Core Control Register at 0x0, whose bit 15 holds
//    the TDC in reset. sc_rd_data is the OR of all register blocks.
// Pre-Processor side (clock pp_clk): one TOT Receiver per link (pp_* ports).
// The RocketIO transceivers themselves are outside this module: the serial
// links, the loopback path and the sync counters sync_accum/sync_limit of each
// core appear as ports.
// Resets are synchronous and active high: rst resets the Digitizer logic, a
// channel's Control Pulse bit 4 resets that channel's Tx (and Rx), pp_rst
// resets the Pre-Processor receivers.
// The partitioning follows the description; the single Digitizer clock, the
// port-level bus and the Pre-Processor enables as plain inputs are this
// design's choices.
module agata_tot_top
  import tot_pkg::*;
#(
  parameter int unsigned SYNC_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              inhibit,
  // slow control
  input  sc_req_t           sc_req,
  output logic [15:0]       sc_rd_data,
  output logic [15:0]       core_ctrl,
  // Digitizer real-time path, per core
  input  logic [15:0]       rkt_data    [2],
  input  logic [1:0]        rkt_charisk [2],
  input  logic [SYNC_W-1:0] sync_accum  [2],
  input  logic [SYNC_W-1:0] sync_limit  [2],
  output logic [15:0]       txdata      [2],
  output logic [1:0]        txcharisk   [2],
  output logic [1:0]        tx_busy,
  // TDC result, also sent to both transmitters
  output tot_word_t         tdc_tot_data,
  output logic              tdc_tot_valid,
  // core 1 loopback receiver
  input  logic [15:0]       lb_rxdata,
  input  logic [1:0]        lb_rxcharisk,
  output logic [15:0]       lb_data_out,
  output logic [1:0]        lb_charisk_out,
  output logic [31:0]       lb_tot_data,
  output logic              lb_tot_flag,
  // Pre-Processor receivers, per link
  input  logic              pp_clk,
  input  logic              pp_rst,
  input  logic [1:0]        pp_rx_enable,
  input  logic [15:0]       pp_rxdata      [2],
  input  logic [1:0]        pp_rxcharisk   [2],
  output logic [15:0]       pp_data_out    [2],
  output logic [1:0]        pp_charisk_out [2],
  output logic [31:0]       pp_tot_data    [2],
  output logic [1:0]        pp_tot_flag,
  output logic [1:0]        pp_rx_busy
);
  timeunit 1ps;
  timeprecision 1ps;

  logic        tdc_rst;
  logic [15:0] rd_core, rd_ch [2];
  logic [1:0]  tx_enable, rx_enable, test_mode, test_valid, chan_rst;
  logic [31:0] test_data [2];
  logic        lb_busy;

  core_ctrl_reg u_core_ctrl (
    .clk(clk), .rst(rst), .sc_req(sc_req), .rd_data(rd_core),
    .core_ctrl(core_ctrl), .tdc_rst(tdc_rst));

  tot_tdc u_tdc (
    .clk(clk), .rst(rst || tdc_rst), .inhibit(inhibit),
    .tot_data(tdc_tot_data), .tot_valid(tdc_tot_valid));

  for (genvar c = 0; c < 2; c++) begin : g_core
    tot_sc #(.BASE_ADDR(c == 0 ? 32'h0000_0050 : 32'h0000_0060),
             .HAS_RX(c == 0)) u_sc (
      .clk(clk), .rst(rst), .sc_req(sc_req), .rd_data(rd_ch[c]),
      .rx_busy(c == 0 ? lb_busy : 1'b0),
      .rx_tot_data(c == 0 ? lb_tot_data : 32'd0),
      .tx_enable(tx_enable[c]), .rx_enable(rx_enable[c]),
      .tx_test_mode(test_mode[c]), .test_valid(test_valid[c]),
      .test_data(test_data[c]), .chan_rst(chan_rst[c]));

    tot_tx #(.SYNC_W(SYNC_W)) u_tx (
      .clk(clk), .rst(rst || chan_rst[c]), .enable(tx_enable[c]),
      .test_mode(test_mode[c]), .tot_data(tdc_tot_data),
      .tot_valid(tdc_tot_valid), .test_data(test_data[c]),
      .test_valid(test_valid[c]), .sync_accum(sync_accum[c]),
      .sync_limit(sync_limit[c]), .rkt_data(rkt_data[c]),
      .rkt_charisk(rkt_charisk[c]), .txdata(txdata[c]),
      .txcharisk(txcharisk[c]), .busy(tx_busy[c]));

    tot_rx u_pp_rx (
      .clk(pp_clk), .rst(pp_rst), .enable(pp_rx_enable[c]),
      .rxdata(pp_rxdata[c]), .rxcharisk(pp_rxcharisk[c]),
      .data_out(pp_data_out[c]), .charisk_out(pp_charisk_out[c]),
      .tot_data(pp_tot_data[c]), .tot_flag(pp_tot_flag[c]), .rx_busy(pp_rx_busy[c]));
  end

  // Diagnostic receiver on the core 1 loopback path.
  tot_rx u_lb_rx (
    .clk(clk), .rst(rst || chan_rst[0]), .enable(rx_enable[0]),
    .rxdata(lb_rxdata), .rxcharisk(lb_rxcharisk),
    .data_out(lb_data_out), .charisk_out(lb_charisk_out),
    .tot_data(lb_tot_data), .tot_flag(lb_tot_flag), .rx_busy(lb_busy));

  assign sc_rd_data = rd_core | rd_ch[0] | rd_ch[1];

endmodule
