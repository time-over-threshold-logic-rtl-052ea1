// tb_tdc_control: self-checking testbench for Control Proc. A shift register
// in the testbench produces s2, s3, s4 from a random inhibit pattern, and a
// cycle count stands in for the captured T_course. Each cycle the load pulses
// and tot_valid are compared with values worked out from the pattern: ld_rise
// on the first high cycle of s2, ld_fall/ld_course on the first low cycle
// after a high run, tot_valid one cycle later and only for runs of at least
// four cycles.
module tb_tdc_control;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 0, rst = 1;
  logic s2 = 0, s3 = 0, s4 = 0;
  logic [15:0] t_course = 0;
  logic ld_rise, ld_fall, ld_course, tot_valid;
  int checks = 0, failures = 0;
  int run = 0, valids = 0, shorts = 0;

  tdc_control dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    logic nxt;
    int len;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    len = 0;
    for (int c = 0; c < 5000; c++) begin
      // choose next s2 value: runs of random length
      if (len == 0) begin
        nxt = !s2;
        len = nxt ? $urandom_range(1, 8) : $urandom_range(2, 6);
      end
      len--;
      @(posedge clk);
      // captured count is latched on the falling edge (as Capture Proc does)
      if (!s2 && s3) t_course <= 16'(run);
      run = s2 ? run + 1 : run;
      if (s2 && !s3) run = 1;
      s4 <= s3; s3 <= s2; s2 <= (len >= 0) ? nxt : s2;
      #1;
      check(ld_rise == (s2 && !s3), "ld_rise");
      check(ld_fall == (!s2 && s3) && ld_course == (!s2 && s3), "ld_fall/ld_course");
      check(tot_valid == (!s3 && s4 && t_course >= 4), "tot_valid");
      if (tot_valid) valids++;
      if (!s3 && s4 && t_course < 4) shorts++;
    end
    check(valids > 50 && shorts > 50, $sformatf("long %0d and short %0d pulses seen", valids, shorts));
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
