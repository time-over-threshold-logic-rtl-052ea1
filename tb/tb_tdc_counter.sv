// tb_tdc_counter: self-checking testbench for the T_course counter. Random
// pulse trains on inh (inh_d is inh one cycle later, as in the TDC); in the
// cycle each pulse ends the count must equal the pulse length in cycles, and
// it must hold afterwards. A long pulse checks saturation at W = 8.
module tb_tdc_counter;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 0, rst = 1, inh = 0, inh_d = 0;
  logic [7:0] count;
  int checks = 0, failures = 0;

  tdc_counter #(.W(8)) dut (.*);

  always #2500 clk = ~clk;
  always @(posedge clk) inh_d <= inh;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic pulse(input int len);
    inh = 1;
    repeat (len) @(posedge clk);
    #1 inh = 0;
    @(posedge clk); #1;   // inh low, inh_d high: falling edge seen
    check(count == ((len > 255) ? 8'hFF : 8'(len)), $sformatf("length %0d counted %0d", len, count));
    repeat (3) begin
      @(posedge clk); #1;
      check(count == ((len > 255) ? 8'hFF : 8'(len)), "count held");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 100; i++) pulse($urandom_range(1, 60));
    pulse(300);
    pulse(2);
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
