// tb_tdc_capture: self-checking testbench for Capture Proc. Random encoder
// values and counts are presented with the three load pulses in the order
// the TDC produces them (rise, then fall together with course); after each
// falling-edge load tot_data must hold T_ref, T_fine = T_rising -
// (126 - count at fall) as a signed byte, and T_course.
module tb_tdc_capture;
  timeunit 1ps;
  timeprecision 1ps;
  import tot_pkg::*;

  logic clk = 0, rst = 1, ld_rise = 0, ld_fall = 0, ld_course = 0;
  logic [7:0] inh_count = 0, ref_count = 0;
  logic [15:0] count = 0;
  tot_word_t tot_data;
  int checks = 0, failures = 0;

  tdc_capture dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int tr, tf_cnt, tref, tc, fine;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      tr = $urandom_range(0, 110);
      tf_cnt = $urandom_range(15, 126);
      tref = $urandom_range(95, 115);
      tc = $urandom_range(4, 65535);
      inh_count = 8'(tr); ld_rise = 1;
      @(posedge clk); #1 ld_rise = 0;
      repeat ($urandom_range(0, 5)) begin
        inh_count = $urandom; count = $urandom; ref_count = $urandom;
        @(posedge clk); #1;
      end
      inh_count = 8'(tf_cnt); ref_count = 8'(tref); count = 16'(tc);
      ld_fall = 1; ld_course = 1;
      @(posedge clk); #1 ld_fall = 0; ld_course = 0;
      inh_count = $urandom; count = $urandom; ref_count = $urandom;
      fine = tr - (126 - tf_cnt);
      check(tot_data.t_ref == 8'(tref), "T_ref");
      check(int'(tot_data.t_fine) == fine, $sformatf("T_fine %0d expected %0d", tot_data.t_fine, fine));
      check(tot_data.t_course == 16'(tc), "T_course");
      @(posedge clk); #1;
      check(tot_data.t_course == 16'(tc) && int'(tot_data.t_fine) == fine, "result held");
    end
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
