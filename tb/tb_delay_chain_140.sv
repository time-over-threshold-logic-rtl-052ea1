// tb_delay_chain_140: self-checking testbench for the reference delay chain
// model: 140 elements fed by the TDC clock itself (5 ns, 30 % high), with the
// sampling-clock skew used in the TDC. At every rising edge each tap must
// equal the clock level (i+1) element delays plus the skew before the edge,
// worked out from the clock waveform; and the pattern must show a 0 -> 1
// step (along the chain) at tap 17 inside window 1 and the next one at tap
// 122 inside window 2, one period (105 taps) apart.
module tb_delay_chain_140;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int  N    = 140;
  localparam real TAU  = 5000.0 / 105.0;
  localparam real SKEW = 2666.7;
  logic clk = 0;
  logic [N-1:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_chain #(.N(N), .TAU_PS(TAU), .CLK_SKEW_PS(SKEW)) dut (
    .clk(clk), .sig_in(clk), .taps(taps));

  initial forever begin #3500 clk = 1; #1500 clk = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    real x, ph;
    logic e;
    repeat (4) @(posedge clk);
    for (int c = 0; c < 200; c++) begin
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        x = SKEW + real'(k + 1) * TAU;          // how long before the edge
        ph = x - 5000.0 * $floor(x / 5000.0);   // position within a period
        e = (ph > 3500.0);                      // high in the last 1.5 ns of it
        check(taps[k] == e, $sformatf("tap %0d", k));
      end
      check(taps[16] == 0 && taps[17] == 1 && taps[121] == 0 && taps[122] == 1,
            "steps at taps 17 and 122");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
