// tb_tot_tx: self-checking testbench for the TOT Transmitter.
//
// Part 1, directed: pass-through when disabled; header one cycle after
// tot_valid on a quiet stream, then word 1 = bits 15:0 and word 2 =
// bits 31:16 with the expected txcharisk; busy from the cycle after the
// request to the last word; each of the four hold-off conditions delays the
// header to the exact cycle it should; requests while busy are ignored;
// test mode takes test_valid/test_data and ignores tot_valid.
// Part 2, random: an ADC stream with periodic syncs (sync bit 15 in the
// cycle sync_accum reaches sync_limit), random K characters and random
// requests. A scoreboard checks that every accepted request gives exactly one
// packet with its data, that a scheduled sync is never overwritten, that no
// header replaces a word carrying bit 15 or a K flag, and that
// the three words before every header carry no sync, no K flag and no word
// of an earlier packet.
module tb_tot_tx;
  timeunit 1ps;
  timeprecision 1ps;
  import tot_pkg::*;

  localparam int SW = 16;
  logic clk = 0, rst = 1, enable = 0, test_mode = 0;
  logic [31:0] tot_data = 0, test_data = 0;
  logic tot_valid = 0, test_valid = 0;
  logic [SW-1:0] sync_accum = 0, sync_limit = 100;
  logic [15:0] rkt_data = 0;
  logic [1:0]  rkt_charisk = 0;
  logic [15:0] txdata;
  logic [1:0]  txcharisk;
  logic busy;
  int checks = 0, failures = 0;

  tot_tx #(.SYNC_W(SW)) dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Advance to just after the next rising edge.
  task automatic tick(); @(posedge clk); #1; endtask

  // Send one request and return the number of cycles until the header.
  task automatic request(input logic [31:0] d, input bit tst, output int lat);
    if (tst) begin test_data = d; test_valid = 1; end
    else     begin tot_data  = d; tot_valid  = 1; end
    tick();
    tot_valid = 0; test_valid = 0;
    tot_data = $urandom; test_data = $urandom;   // must not matter after latch
    lat = 1;
    while (!(txcharisk == 2'b11 && txdata == 16'h1C1C) && lat < 50) begin
      check(busy, "busy while waiting");
      tick(); lat++;
    end
    check(txdata == 16'h1C1C && txcharisk == 2'b11, "header");
    check(busy, "busy at header");
    tick();
    check(txdata == d[15:0] && txcharisk == 2'b00, "TOT word 1");
    check(busy, "busy at word 1");
    tick();
    check(txdata == d[31:16] && txcharisk == 2'b00, "TOT word 2");
    check(busy, "busy at word 2");
    tick();
    check(!busy, "busy cleared after packet");
  endtask

  // Part 2 scoreboard state.
  int pend_q[$];
  logic [31:0] exp_q[$];
  int phase = 0;
  logic [31:0] cur;
  logic [15:0] out_hist [3];
  logic        bad_hist [3];
  logic        sync_now;
  int packets = 0, syncs = 0, ks = 0, delayed = 0;

  initial begin
    int lat;
    repeat (3) tick();
    rst = 0;
    // disabled: transparent
    for (int i = 0; i < 20; i++) begin
      rkt_data = $urandom; rkt_charisk = $urandom; tot_valid = $urandom;
      #100;
      check(txdata == rkt_data && txcharisk == rkt_charisk, "transparent when disabled");
      tick();
    end
    check(!busy, "no busy when disabled");
    rkt_data = 16'h0123; rkt_charisk = 0; tot_valid = 0;
    enable = 1;
    repeat (5) tick();
    // minimum latency
    request(32'hCAFE_1234, 0, lat);
    check(lat == 1, $sformatf("minimum latency 1, got %0d", lat));
    // condition 4: next packet waits for four cycles after the last word
    tot_data = 32'h1111_2222; tot_valid = 1; tick(); tot_valid = 0;
    lat = 1; while (txcharisk != 2'b11) begin tick(); lat++; end
    check(lat == 3, $sformatf("gap of four cycles, latency %0d", lat));
    repeat (3) tick();
    repeat (6) tick();
    // condition 2: sync bit in current or 3 previous cycles
    rkt_data = 16'h8000; tick(); rkt_data = 16'h0005;
    request(32'hAAAA_5555, 0, lat);
    check(lat == 3, $sformatf("sync-bit hold-off, latency %0d", lat));
    repeat (6) tick();
    // condition 3: K character
    rkt_charisk = 2'b01; rkt_data = 16'h00FC; tick(); rkt_charisk = 0; rkt_data = 16'h0006;
    request(32'h5A5A_A5A5, 0, lat);
    check(lat == 3, $sformatf("K hold-off, latency %0d", lat));
    repeat (6) tick();
    // condition 1: sync due within four cycles
    sync_limit = 100; sync_accum = 97;
    fork
      request(32'h0F0F_F0F0, 0, lat);
      begin
        for (int i = 0; i < 20; i++) begin
          @(posedge clk);
          sync_accum <= (sync_accum < sync_limit) ? sync_accum + 1'b1 : '0;
        end
      end
    join
    // accum is 98, 99, 100 in the three cycles after the request (sync due),
    // then wraps to 0: the header goes out in the fourth cycle
    check(lat == 4, $sformatf("sync-due hold-off, latency %0d", lat));
    sync_accum = 0;
    repeat (6) tick();
    // test mode
    test_mode = 1;
    tot_valid = 1; tick(); tot_valid = 0;
    repeat (3) begin check(!busy && txcharisk == 2'b00, "tot_valid ignored in test mode"); tick(); end
    request(32'hDEAD_BEEF, 1, lat);
    check(lat == 1, "test-mode latency");
    test_mode = 0; repeat (5) tick();
    test_valid = 1; tick(); test_valid = 0;
    check(!busy, "test_valid ignored in normal mode");
    repeat (5) tick();

    // Part 2: random traffic
    for (int k = 0; k < 3; k++) begin out_hist[k] = 0; bad_hist[k] = 1; end
    sync_limit = 40; sync_accum = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // drive this cycle's inputs
      sync_now = (sync_accum == sync_limit);
      rkt_data = {sync_now | ($urandom_range(0, 99) == 0), 15'($urandom)};
      rkt_charisk = ($urandom_range(0, 59) == 0) ? 2'b11 : 2'b00;
      if (rkt_charisk != 0) rkt_data = 16'hFCFC;
      tot_valid = ($urandom_range(0, 9) == 0);
      tot_data = $urandom;
      #100;
      if (tot_valid && !busy) exp_q.push_back(tot_data);
      // output checks
      if (sync_now) check(txdata == rkt_data && txcharisk == rkt_charisk, "scheduled sync kept");
      if (rkt_data[15] || rkt_charisk != 0) begin
        if (rkt_data[15]) syncs++;
        if (rkt_charisk != 0) ks++;
      end
      if (phase == 0 && txcharisk == 2'b11 && txdata == 16'h1C1C) begin
        check(exp_q.size() > 0, "packet without request");
        if (exp_q.size() > 0) cur = exp_q.pop_front();
        for (int k = 0; k < 3; k++) check(!bad_hist[k], "replayed words are plain data");
        check(!rkt_data[15] && rkt_charisk == 0, "header does not replace sync/K");
        packets++;
        phase = 1;
        bad_hist[0] = 1;
      end else if (phase == 1) begin
        check(txdata == cur[15:0] && txcharisk == 0, "random word 1"); phase = 2; bad_hist[0] = 1;
      end else if (phase == 2) begin
        check(txdata == cur[31:16] && txcharisk == 0, "random word 2"); phase = 0; bad_hist[0] = 1;
      end else begin
        bad_hist[0] = txdata[15] || (txcharisk != 0);
        if (busy) delayed++;
      end
      tick();
      bad_hist[2] = bad_hist[1]; bad_hist[1] = bad_hist[0];
      if (sync_accum >= sync_limit) sync_accum = 0; else sync_accum++;
    end
    check(packets > 200, $sformatf("enough random packets (%0d)", packets));
    check(syncs > 100 && ks > 100, "syncs and K characters seen");
    check(exp_q.size() <= 1, "all requests served");
    $display("random: packets=%0d syncs=%0d k=%0d waiting_cycles=%0d", packets, syncs, ks, delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
