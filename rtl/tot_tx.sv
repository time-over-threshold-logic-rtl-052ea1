// tot_tx: TOT Transmitter. Sits on the real-time path in front of the
// RocketIO transceiver and, on request, replaces three words of ADC data with
// a TOT packet: K28.0 on both bytes (txcharisk = 11), then bits 15:0, then
// bits 31:16 of the TOT word (txcharisk = 00).
//
// Operation
//  * enable low: rkt_data/rkt_charisk go straight to txdata/txcharisk with no
//    added latency; all packet state is cleared.
//  * enable high: tot_valid (or test_valid when test_mode is high) latches
//    tot_data (or test_data) into a three-word pipeline and raises busy. The
//    header goes out at the earliest in the next cycle, and only in a cycle in
//    which none of the four hold-off conditions is true:
//      1. a sync is due within SYNC_LOOKAHEAD cycles (sync_accum/sync_limit),
//      2. rkt_data[15] (sync/inhibit) is high now or was in the last HIST cycles,
//      3. a rkt_charisk bit is high now or was in the last HIST cycles,
//      4. fewer than GAP cycles have passed since the last word of the previous
//         packet.
//    Once started, the packet goes out on three consecutive cycles and busy
//    falls after the last word. Requests are ignored while busy.
//  These rules keep the receiver's masking (it replays the three words that
//  preceded the header) from ever repeating a sync, a K character or old TOT
//  data, and keep a sync from ever being overwritten.
//
// Follows the description: the pass-through, the packet format and order, the
// four conditions with their counts, busy, and the test-mode selection. This
// design's own choices: the sync-due test (a sync is taken to go out in the
// cycle sync_accum equals sync_limit, so it is "due" when
// sync_limit - sync_accum <= SYNC_LOOKAHEAD, or sync_accum has passed the
// limit), the width of the sync counters, a synchronous active-high reset, and
// the decision to start a packet combinationally from the current cycle's
// inputs, which gives the one-cycle minimum latency from tot_valid to header.
module tot_tx
  import tot_pkg::*;
#(
  parameter int unsigned SYNC_W          = 16,
  parameter int unsigned SYNC_LOOKAHEAD  = 4,
  parameter int unsigned HIST            = 3,
  parameter int unsigned GAP             = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic              test_mode,
  input  logic [31:0]       tot_data,
  input  logic              tot_valid,
  input  logic [31:0]       test_data,
  input  logic              test_valid,
  input  logic [SYNC_W-1:0] sync_accum,
  input  logic [SYNC_W-1:0] sync_limit,
  input  logic [15:0]       rkt_data,
  input  logic [1:0]        rkt_charisk,
  output logic [15:0]       txdata,
  output logic [1:0]        txcharisk,
  output logic              busy
);
  timeunit 1ps;
  timeprecision 1ps;


  // Request source selected by test_mode.
  logic [31:0] sel_data;
  logic        sel_valid;
  assign sel_data  = test_mode ? test_data  : tot_data;
  assign sel_valid = test_mode ? test_valid : tot_valid;

  // Control state.
  logic        pending;          // packet latched, header not yet sent
  logic [1:0]  words_left;       // TOT words still to send after the header
  logic [15:0] pipe [3];         // [0] is the word on the output next
  logic [HIST-1:0] hist_sync;    // rkt_data[15] over the previous HIST cycles
  logic [HIST-1:0] hist_k;       // |rkt_charisk over the previous HIST cycles
  localparam int unsigned GAP_W = $clog2(GAP+1);
  localparam logic [GAP_W-1:0] GAP_V = GAP_W'(GAP);
  logic [GAP_W-1:0] gap_cnt;

  logic load_t_data, send_t_pkt, t_pkt_charisk, start, sync_due, blocked;

  always_comb begin
    sync_due = (sync_accum >= sync_limit) ||
               ((sync_limit - sync_accum) <= SYNC_W'(SYNC_LOOKAHEAD));
    blocked  = sync_due || rkt_data[15] || (|hist_sync) ||
               (|rkt_charisk) || (|hist_k) || (gap_cnt < GAP_V);
  end

  assign busy          = pending || (words_left != 2'd0);
  assign load_t_data   = enable && !busy && sel_valid;
  assign start         = enable && pending && !blocked;
  assign send_t_pkt    = start || (words_left != 2'd0);
  assign t_pkt_charisk = start;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      pending    <= 1'b0;
      words_left <= 2'd0;
      gap_cnt    <= GAP_V;
    end else begin
      if (load_t_data) begin
        pending <= 1'b1;
        pipe[0] <= TOT_HEADER;
        pipe[1] <= sel_data[15:0];
        pipe[2] <= sel_data[31:16];
      end else if (send_t_pkt) begin
        pipe[0] <= pipe[1];
        pipe[1] <= pipe[2];
      end
      if (start) begin
        pending    <= 1'b0;
        words_left <= 2'd2;
      end else if (words_left != 2'd0) begin
        words_left <= words_left - 2'd1;
      end
      if (words_left == 2'd1)       gap_cnt <= GAP_W'(1);   // last word goes out now
      else if (gap_cnt < GAP_V)       gap_cnt <= gap_cnt + 1'b1;
    end
  end

  // History of the sync bit and K flags on the incoming stream.
  always_ff @(posedge clk) begin
    if (rst) begin
      hist_sync <= '0;
      hist_k    <= '0;
    end else begin
      hist_sync <= {hist_sync[HIST-2:0], rkt_data[15]};
      hist_k    <= {hist_k[HIST-2:0], |rkt_charisk};
    end
  end

  // Output multiplexer: packet words replace the ADC stream while sending.
  always_comb begin
    txdata    = send_t_pkt ? pipe[0] : rkt_data;
    txcharisk = t_pkt_charisk ? 2'b11 : (send_t_pkt ? 2'b00 : rkt_charisk);
  end

  // A packet never starts on a sync or a K character.
  a_no_start_on_sync: assert property (@(posedge clk) disable iff (rst)
    start |-> (!rkt_data[15] && rkt_charisk == 2'b00));

endmodule
