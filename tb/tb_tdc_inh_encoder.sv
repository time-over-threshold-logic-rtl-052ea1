// tb_tdc_inh_encoder: self-checking testbench for the Inh Encoder. Presents
// thermometer codes of every length 0..126, codes with random bubbles and
// fully random words on consecutive cycles, and checks that each count
// (two clock edges later) equals the number of ones, counted in the testbench.
module tb_tdc_inh_encoder;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 126;
  logic clk = 0;
  logic [N-1:0] taps = '0;
  logic [7:0] count;
  int checks = 0, failures = 0;
  int exp_q[$];

  tdc_inh_encoder dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int ones(input logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    logic [N-1:0] v;
    exp_q.push_back(-1);   // count lags the taps by two edges: one loop step
    for (int i = 0; i < 600; i++) begin
      if (i <= N) v = (i == 0) ? '0 : ({N{1'b1}} >> (N - i));     // thermometer
      else if (i < 400) begin
        v = {N{1'b1}} >> $urandom_range(0, N);
        v[$urandom_range(0, N - 1)] ^= 1'b1;                       // bubble
      end else v = {$urandom, $urandom, $urandom, $urandom};
      taps = v;
      exp_q.push_back(ones(v));
      @(posedge clk); #1;
      begin
        int e;
        e = exp_q.pop_front();
        if (e >= 0) check(count == 8'(e), $sformatf("count %0d expected %0d", count, e));
      end
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
