// tb_tdc_ref_encoder: self-checking testbench for the Ref Encoder. Builds
// the tap pattern the reference chain shows for a clock of period P taps
// (a 0 -> 1 transition at tap p inside window 1 and the next one at p + P
// inside window 2, high for 36 taps after each) and checks that t_ref, two
// clock edges later, equals P, for random p and P from 100 to 110 taps.
// Bits outside the windows are randomised: they must not matter.
module tb_tdc_ref_encoder;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 140;
  logic clk = 0;
  logic [N-1:0] taps = '0;
  logic [7:0] t_ref;
  int checks = 0, failures = 0;
  int exp_q[$];

  tdc_ref_encoder dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int p, per, e;
    logic [N-1:0] v;
    exp_q.push_back(-1);   // t_ref lags the taps by two edges: one loop step
    for (int i = 0; i < 500; i++) begin
      per = $urandom_range(100, 110);
      p = $urandom_range(1, 34);
      if (p + per < 105) p = 105 - per;
      if (p + per > 139) p = 139 - per;
      for (int k = 0; k < N; k++) begin
        if (k < p)                 v[k] = 1'b0;
        else if (k < p + 36)       v[k] = 1'b1;
        else if (k < p + per)      v[k] = 1'b0;
        else                       v[k] = 1'b1;
        if (k > 34 && k < 105)     v[k] = 1'($urandom);
      end
      taps = v;
      exp_q.push_back(per);
      @(posedge clk); #1;
      e = exp_q.pop_front();
      if (e >= 0) check(t_ref == 8'(e), $sformatf("t_ref %0d expected %0d", t_ref, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
