// tb_tot_rx: self-checking testbench for the TOT Receiver.
//
// A stream of random ADC words is generated with TOT packets (K28.0 header
// on both bytes, then two data words) inserted at random points at least
// four words apart, and occasional K28.7 alignment words. The expected
// outputs are worked out from the stored input stream: data_out one cycle
// after rxdata, except that the header and the two TOT words are replaced by
// the three words before the header with charisk_out 00; tot_flag for one
// cycle one cycle after TOT word 2 with tot_data = {word 2, word 1}. The
// stream is run with the receiver enabled, then disabled (everything passes
// through, the packets included).
module tb_tot_rx;
  timeunit 1ps;
  timeprecision 1ps;
  import tot_pkg::*;

  localparam int L = 6000;
  logic clk = 0, rst = 1, enable = 0;
  logic [15:0] rxdata = 0;
  logic [1:0]  rxcharisk = 0;
  logic [15:0] data_out;
  logic [1:0]  charisk_out;
  logic [31:0] tot_data;
  logic        tot_flag, rx_busy;
  int checks = 0, failures = 0;

  tot_rx dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  logic [15:0] in_d [L];
  logic [1:0]  in_k [L];
  bit          is_hdr [L];

  initial begin
    int last, packets, aligns, n;
    // build the stream
    last = -10; packets = 0; aligns = 0;
    for (int t = 0; t < L; t++) begin
      is_hdr[t] = 0;
      in_d[t] = 16'($urandom) & 16'h7FFF;
      in_k[t] = 2'b00;
    end
    for (int t = 4; t < L - 3; t++) begin
      if (t - last >= 6 && $urandom_range(0, 7) == 0) begin
        is_hdr[t] = 1;
        in_d[t] = TOT_HEADER; in_k[t] = 2'b11;
        in_d[t+1] = 16'($urandom); in_d[t+2] = 16'($urandom);
        last = t + 2;
        packets++;
        t += 2;
      end else if (t - last >= 4 && $urandom_range(0, 30) == 0) begin
        in_d[t] = {K28_7, K28_7}; in_k[t] = 2'b11; aligns++;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      enable = (pass == 0);
      n = 0;
      for (int t = 0; t < L + 2; t++) begin
        if (t < L) begin rxdata = in_d[t]; rxcharisk = in_k[t]; end
        else begin rxdata = 0; rxcharisk = 0; end
        @(posedge clk); #1;
        // data_out now shows the result for input t
        if (t >= 1 && t < L) begin
          logic [15:0] ed; logic [1:0] ek;
          ed = in_d[t]; ek = in_k[t];
          if (enable) begin
            for (int j = 0; j < 3; j++)
              if (t - j >= 0 && is_hdr[t - j]) begin ed = in_d[t - 3]; ek = 2'b00; end
          end
          check(data_out == ed && charisk_out == ek,
                $sformatf("data_out at %0d: %h/%b expected %h/%b", t, data_out, charisk_out, ed, ek));
          // tot_flag in the cycle after word 2 was on rxdata
          if (t >= 2 && enable && is_hdr[t - 2]) begin
            check(tot_flag, "tot_flag after word 2");
            check(tot_data == {in_d[t], in_d[t - 1]}, "tot_data = {word 2, word 1}");
            n++;
          end else begin
            check(!tot_flag, "no spurious tot_flag");
          end
          check(rx_busy == (enable && (is_hdr[t] || is_hdr[t - 1])),
                "rx_busy while collecting");
        end
      end
      if (enable) check(n == packets && packets > 100, $sformatf("packets %0d of %0d", n, packets));
    end
    check(aligns > 50, "alignment words exercised");
    $display("packets=%0d align_words=%0d", packets, aligns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
