// tb_agata_tot_top: end-to-end testbench of the Digitizer TOT logic and the
// Pre-Processor receivers, at the default parameters.
//
// The testbench models what surrounds the design: the pre-amplifier inhibit
// line (long inhibit pulses and 10 ns sync pulses), the Core's ADC stream on
// each channel (14-bit random samples, bit 15 = sync/inhibit, a sync every
// SYNC_LIMIT+1 cycles from sync_accum/sync_limit counters, occasional K28.7
// alignment words), and each RocketIO link as a fixed LINK-cycle delay from
// txdata to the Pre-Processor receiver and, for core 1, to the loopback
// receiver. The slow-control bus is driven as the Digitizer's controller
// would.
//
// Checks:
//  * every TDC result appears, unchanged, at both Pre-Processor receivers and
//    at the loopback receiver, in order;
//  * each packet is completed within 1 us of the falling edge of inhibit
//    (counts how many within 150 ns);
//  * the Pre-Processor output stream equals the received stream one cycle
//    later with each packet replaced by the three words before it, and no
//    TOT header or TOT word leaks out (the words replayed are plain ADC data);
//  * no scheduled sync word is ever overwritten on txdata;
//  * test mode over slow control: the test word arrives at the far end and
//    reads back from the loopback Data Rx registers; a second request while
//    busy is ignored; a request right after a packet waits for the gap;
//  * with a Pre-Processor receiver disabled the packet passes through;
//  * 10 ns sync pulses and pulses while the TDC is held in reset (Core
//    Control bit 15) give no TOT packet; a channel reset pulse clears busy.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_agata_tot_top;
  timeunit 1ps;
  timeprecision 1ps;
  import tot_pkg::*;

  localparam int SW = 16;
  localparam int LINK = 4;
  localparam int SYNC_LIMIT = 199;   // a sync every 1 us at 200 MHz
  localparam int MAXC = 1 << 18;

  logic clk = 0, rst = 1, inhibit = 0;
  sc_req_t sc_req;
  logic [15:0] sc_rd_data, core_ctrl;
  logic [15:0] rkt_data [2];
  logic [1:0]  rkt_charisk [2];
  logic [SW-1:0] sync_accum [2], sync_limit [2];
  logic [15:0] txdata [2];
  logic [1:0]  txcharisk [2];
  logic [1:0]  tx_busy;
  tot_word_t   tdc_tot_data;
  logic        tdc_tot_valid;
  logic [15:0] lb_rxdata, lb_data_out;
  logic [1:0]  lb_rxcharisk, lb_charisk_out;
  logic [31:0] lb_tot_data;
  logic        lb_tot_flag;
  logic        pp_clk, pp_rst = 1;
  logic [1:0]  pp_rx_enable = 2'b11;
  logic [15:0] pp_rxdata [2], pp_data_out [2];
  logic [1:0]  pp_rxcharisk [2], pp_charisk_out [2];
  logic [31:0] pp_tot_data [2];
  logic [1:0]  pp_tot_flag, pp_rx_busy;

  agata_tot_top dut (.*);

  assign pp_clk = clk;
  initial forever begin #3500 clk = 1; #1500 clk = 0; end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- environment: ADC streams and links ----------------
  logic [15:0] link_d [2][LINK];
  logic [1:0]  link_k [2][LINK];
  logic        inh_s;
  bit          sync_word [2];
  bit          adc_quiet = 0;
  bit          hold_sync [2] = '{0, 0};
  int          cyc = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    inh_s <= inhibit;
    for (int c = 0; c < 2; c++) begin
      if (rst) sync_accum[c] <= SW'(c * 37);
      else if (hold_sync[c]) sync_accum[c] <= SW'(SYNC_LIMIT - 2);
      else     sync_accum[c] <= (sync_accum[c] >= SYNC_LIMIT) ? '0 : sync_accum[c] + 1'b1;
      link_d[c][0] <= txdata[c];
      link_k[c][0] <= txcharisk[c];
      for (int j = 1; j < LINK; j++) begin
        link_d[c][j] <= link_d[c][j-1];
        link_k[c][j] <= link_k[c][j-1];
      end
    end
  end

  // ADC word for the coming cycle: a function of the counters, so that a
  // sync word goes out in the cycle sync_accum equals sync_limit.
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      sync_limit[c] = SW'(SYNC_LIMIT);
      sync_word[c]  = (sync_accum[c] == sync_limit[c]);
    end
  end

  logic [13:0] adc_val [2];
  logic        k_word  [2];
  always_ff @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      adc_val[c] <= 14'($urandom);
      k_word[c]  <= !adc_quiet && ($urandom_range(0, 399) == 0);
    end
  end
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      if (k_word[c] && !sync_word[c]) begin
        rkt_data[c] = {K28_7, K28_7};
        rkt_charisk[c] = 2'b11;
      end else begin
        rkt_data[c] = {sync_word[c] | inh_s, 1'b0, adc_val[c]};
        rkt_charisk[c] = 2'b00;
      end
    end
  end

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      pp_rxdata[c] = link_d[c][LINK-1];
      pp_rxcharisk[c] = link_k[c][LINK-1];
    end
    lb_rxdata = link_d[0][LINK-1];
    lb_rxcharisk = link_k[0][LINK-1];
  end

  // ---------------- scoreboards ----------------
  logic [31:0] exp_pp [2][$];
  logic [31:0] exp_lb [$];
  int n_tdc = 0, n_pp [2] = '{0, 0}, n_lb = 0;
  int n_hold_sync = 0, n_hold_bit15 = 0, n_hold_k = 0, n_hold_gap = 0;
  int n_within_150 = 0, n_within_1us = 0, n_late = 0;
  int n_test_pkts = 0, n_busy_ignored = 0, n_passthrough = 0;
  int n_short_filtered = 0, n_tdc_reset_blocked = 0, n_chan_reset = 0;
  int n_sync_kept = 0, n_masked = 0;
  realtime fall_time;
  bit      meas_pending [2] = '{0, 0};

  // received stream history per Pre-Processor receiver
  logic [15:0] h_d [2][MAXC];
  logic [1:0]  h_k [2][MAXC];
  bit          h_hdr [2][MAXC];
  int          last_hdr [2] = '{-10, -10};

  // internal transmitter state, observed only to count the hold-off causes
  logic pr_pending [2], pr_blocked [2], pr_sync_due [2], pr_hist_sync [2];
  logic pr_hist_k [2], pr_gap_short [2], pr_last_word [2];
  for (genvar g = 0; g < 2; g++) begin : g_probe
    assign pr_pending[g]   = dut.g_core[g].u_tx.pending;
    assign pr_blocked[g]   = dut.g_core[g].u_tx.blocked;
    assign pr_sync_due[g]  = dut.g_core[g].u_tx.sync_due;
    assign pr_hist_sync[g] = |dut.g_core[g].u_tx.hist_sync;
    assign pr_hist_k[g]    = |dut.g_core[g].u_tx.hist_k;
    assign pr_gap_short[g] = dut.g_core[g].u_tx.gap_cnt < 4;
    assign pr_last_word[g] = dut.g_core[g].u_tx.words_left == 2'd1;
  end

  always @(negedge clk) begin
    if (!rst) begin
      if (tdc_tot_valid) begin
        n_tdc++;
        for (int c = 0; c < 2; c++) begin
          exp_pp[c].push_back(tdc_tot_data);
          meas_pending[c] = 1;
        end
        exp_lb.push_back(tdc_tot_data);
      end
      for (int c = 0; c < 2; c++) begin
        // hold-off reasons while a packet waits
        if (pr_pending[c] && pr_blocked[c]) begin
          if (pr_sync_due[c]) n_hold_sync++;
          if (rkt_data[c][15] || pr_hist_sync[c]) n_hold_bit15++;
          if (|rkt_charisk[c] || pr_hist_k[c]) n_hold_k++;
          if (pr_gap_short[c]) n_hold_gap++;
        end
        if (sync_word[c]) begin
          check(txdata[c] == rkt_data[c] && txcharisk[c] == rkt_charisk[c], "sync word kept");
          n_sync_kept++;
        end
        // end of a packet on txdata: latency from the end of inhibit
        if (pr_last_word[c] && meas_pending[c]) begin
          realtime lat;
          lat = $realtime - fall_time;
          meas_pending[c] = 0;
          if (lat <= 150000.0) n_within_150++;
          if (lat <= 1000000.0) n_within_1us++;
          else begin n_late++; check(0, $sformatf("packet %0.0f ps after inhibit", lat)); end
        end
        // Pre-Processor receiver output stream
        h_d[c][cyc] = pp_rxdata[c];
        h_k[c][cyc] = pp_rxcharisk[c];
        h_hdr[c][cyc] = pp_rx_enable[c] && (cyc - last_hdr[c] > 2) &&
                        pp_rxdata[c] == TOT_HEADER && pp_rxcharisk[c] == 2'b11;
        if (h_hdr[c][cyc]) last_hdr[c] = cyc;
        if (cyc > 8 && !pp_rst) begin
          logic [15:0] ed; logic [1:0] ek;
          ed = h_d[c][cyc-1]; ek = h_k[c][cyc-1];
          for (int j = 1; j <= 3; j++)
            if (h_hdr[c][cyc-j]) begin ed = h_d[c][cyc-4]; ek = 2'b00; end
          if (ek != h_k[c][cyc-1]) n_masked++;
          check(pp_data_out[c] == ed && pp_charisk_out[c] == ek, $sformatf("Pre-Processor output stream ch%0d cyc %0d: %h/%b expected %h/%b (in %h %h %h %h)", c, cyc, pp_data_out[c], pp_charisk_out[c], ed, ek, h_d[c][cyc-1], h_d[c][cyc-2], h_d[c][cyc-3], h_d[c][cyc-4]));
          if (pp_rx_enable[c])
            check(!(pp_charisk_out[c] == 2'b11 && pp_data_out[c] == TOT_HEADER), "no header leaks");
        end
        if (pp_tot_flag[c]) begin
          n_pp[c]++;
          check(exp_pp[c].size() > 0, "TOT word at Pre-Processor without a result");
          if (exp_pp[c].size() > 0) begin
            logic [31:0] e;
            e = exp_pp[c].pop_front();
            check(pp_tot_data[c] == e, $sformatf("Pre-Processor ch%0d TOT %h expected %h", c, pp_tot_data[c], e));
          end
        end
      end
      if (lb_tot_flag) begin
        n_lb++;
        check(exp_lb.size() > 0, "loopback TOT word without a result");
        if (exp_lb.size() > 0) begin
          logic [31:0] e;
          e = exp_lb.pop_front();
          check(lb_tot_data == e, "loopback TOT word");
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic sc_write(input logic [31:0] a, input logic [15:0] d);
    @(posedge clk); #1;
    sc_req.addr = a; sc_req.wr = 1; sc_req.wdata = d;
    @(posedge clk); #1;
    sc_req.wr = 0;
  endtask

  task automatic sc_read(input logic [31:0] a, output logic [15:0] d);
    @(posedge clk); #1;
    sc_req.addr = a;
    #1 d = sc_rd_data;
  endtask

  task automatic inhibit_pulse(input int len_ps);
    @(posedge clk);
    #($urandom_range(1, 4999));
    inhibit = 1;
    #(len_ps);
    inhibit = 0;
    fall_time = $realtime;
    repeat (60) @(posedge clk);
  endtask

  task automatic tdc_pulse_expect(input int len_ps, input bit expect_valid);
    int n_before;
    n_before = n_tdc;
    inhibit_pulse(len_ps);
    check((n_tdc > n_before) == expect_valid, "TDC result as expected");
  endtask

  initial begin
    logic [15:0] v;
    int n_before;
    sc_req = '0;
    repeat (5) @(posedge clk);
    #1 rst = 0; pp_rst = 0;
    sc_write(32'h0, 16'h0000);
    sc_write(32'h51, 16'h0003);          // core 1: Tx and Rx enabled
    sc_write(32'h61, 16'h0001);          // core 2: Tx enabled
    sc_read(32'h51, v); check(v == 16'h0003, "mode read-back core 1");
    sc_read(32'h61, v); check(v == 16'h0001, "mode read-back core 2");

    // normal operation: random inhibit pulses, some 10 ns sync pulses
    for (int i = 0; i < 60; i++) begin
      if (i % 4 == 0) begin
        n_before = n_tdc;
        inhibit_pulse(10000);
        check(n_tdc == n_before, "10 ns sync pulse filtered");
        if (n_tdc == n_before) n_short_filtered++;
      end
      tdc_pulse_expect((i < 10) ? $urandom_range(20000, 60000) : $urandom_range(20000, 2000000), 1);
    end
    repeat (100) @(posedge clk);
    sc_read(32'h55, v); check(v == lb_tot_data[15:0], "Data Rx LSB read-back");
    sc_read(32'h56, v); check(v == lb_tot_data[31:16], "Data Rx MSB read-back");

    // test mode on core 1
    adc_quiet = 1;
    sc_write(32'h53, 16'h4321);
    sc_write(32'h54, 16'h8765);
    sc_write(32'h51, 16'h0007);
    exp_pp[0].push_back(32'h8765_4321); exp_lb.push_back(32'h8765_4321);
    n_before = n_pp[0];
    sc_write(32'h52, 16'h0001);
    @(posedge clk); #1;
    // second request while the first is still pending or sending: ignored
    check(tx_busy[0], "core 1 busy after test request");
    if (tx_busy[0]) begin
      sc_write(32'h52, 16'h0001);
      n_busy_ignored++;
    end
    // request timed to reach the transmitter as soon as busy falls: the
    // header must wait until four cycles after the previous packet's last word
    while (!pr_last_word[0]) begin @(posedge clk); #1; end
    exp_pp[0].push_back(32'h8765_4321); exp_lb.push_back(32'h8765_4321);
    sc_req.addr = 32'h52; sc_req.wr = 1; sc_req.wdata = 16'h0001;
    @(posedge clk); #1 sc_req.wr = 0;
    repeat (40) @(posedge clk);
    check(n_pp[0] == n_before + 2, $sformatf("test packets received (%0d)", n_pp[0] - n_before));
    n_test_pkts += n_pp[0] - n_before;
    sc_read(32'h55, v); check(v == 16'h4321, "loopback test LSB");
    sc_read(32'h56, v); check(v == 16'h8765, "loopback test MSB");
    sc_write(32'h51, 16'h0003);
    // a TDC result is ignored while core 1 is in test mode
    begin
      int b0;
      b0 = n_pp[0];
      sc_write(32'h51, 16'h0007);
      inhibit_pulse(100000);
      check(n_pp[0] == b0, "tot_valid ignored in test mode");
      void'(exp_pp[0].pop_back()); void'(exp_lb.pop_back());
      repeat (40) @(posedge clk);
      sc_write(32'h51, 16'h0003);
    end
    adc_quiet = 0;

    // receiver disabled at the Pre-Processor: packet passes through
    pp_rx_enable[1] = 0;
    n_before = n_pp[1];
    inhibit_pulse(50000);
    void'(exp_pp[1].pop_back());
    check(n_pp[1] == n_before, "disabled receiver gives no TOT word");
    n_passthrough++;
    repeat (10) @(posedge clk);
    pp_rx_enable[1] = 1;

    // TDC held in reset by Core Control bit 15
    sc_write(32'h0, 16'h8000);
    sc_read(32'h0, v); check(v == 16'h8000 && core_ctrl == 16'h8000, "core control read-back");
    tdc_pulse_expect(100000, 0);
    n_tdc_reset_blocked++;
    sc_write(32'h0, 16'h0000);
    tdc_pulse_expect(100000, 1);

    // channel reset while a packet waits on core 2
    sc_write(32'h61, 16'h0005);
    sc_write(32'h63, 16'h1111); sc_write(32'h64, 16'h2222);
    hold_sync[1] = 1;                    // sync kept due: the packet waits
    sc_write(32'h62, 16'h0001);
    repeat (3) @(posedge clk);
    check(tx_busy[1], "core 2 waiting");
    sc_write(32'h62, 16'h0010);
    @(posedge clk); #1;
    check(!tx_busy[1], "channel reset clears busy");
    if (!tx_busy[1]) n_chan_reset++;
    hold_sync[1] = 0;
    sc_write(32'h61, 16'h0001);
    repeat (50) @(posedge clk);

    // summary
    check(exp_pp[0].size() == 0 && exp_pp[1].size() == 0 && exp_lb.size() == 0, "all results delivered");
    $display("tdc_results=%0d pp0=%0d pp1=%0d loopback=%0d test_packets=%0d", n_tdc, n_pp[0], n_pp[1], n_lb, n_test_pkts);
    $display("hold-off cycles: sync_due=%0d bit15=%0d k=%0d gap=%0d", n_hold_sync, n_hold_bit15, n_hold_k, n_hold_gap);
    $display("latency: within_150ns=%0d within_1us=%0d late=%0d", n_within_150, n_within_1us, n_late);
    $display("masked=%0d syncs_kept=%0d short_filtered=%0d busy_ignored=%0d passthrough=%0d tdc_reset=%0d chan_reset=%0d",
             n_masked, n_sync_kept, n_short_filtered, n_busy_ignored, n_passthrough, n_tdc_reset_blocked, n_chan_reset);
    check(n_tdc >= 60, "TDC results");
    check(n_hold_sync > 0, "mechanism: sync-due hold-off");
    check(n_hold_bit15 > 0, "mechanism: sync/inhibit-bit hold-off");
    check(n_hold_k > 0, "mechanism: K-character hold-off");
    check(n_hold_gap > 0, "mechanism: packet-gap hold-off");
    check(n_masked > 0, "mechanism: masking at the receiver");
    check(n_test_pkts > 0, "mechanism: test mode");
    check(n_busy_ignored > 0, "mechanism: request ignored while busy");
    check(n_passthrough > 0, "mechanism: receiver disabled");
    check(n_short_filtered > 0, "mechanism: short sync pulse filtered");
    check(n_tdc_reset_blocked > 0, "mechanism: TDC reset");
    check(n_chan_reset > 0, "mechanism: channel reset");
    check(n_within_1us > 0 && n_late == 0, "mechanism: transmission within 1 us");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd5000 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
