// tb_delay_chain_126: self-checking testbench for the inhibit delay chain
// model (126 elements of 5000/105 ps). Inhibit is switched at random times
// inside a clock period; at the following rising clock edge the sampled taps
// must form a thermometer code whose length is the time since the switch
// divided by the element delay (ones after a rise, zeros after a fall), the
// same one period later (the chain is longer than a period), and two periods
// later every tap must show the new level.
module tb_delay_chain_126;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int  N   = 126;
  localparam real TAU = 5000.0 / 105.0;
  logic clk = 0, sig_in = 0;
  logic [N-1:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_chain #(.N(N), .TAU_PS(TAU)) dut (.*);

  // TDC clock: 5 ns period, 30 % high
  initial forever begin #3500 clk = 1; #1500 clk = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int d, n;
    logic lvl;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      d = $urandom_range(1, 4999);         // switch d ps before the next edge
      #(5000 - d);
      lvl = !sig_in;
      sig_in = lvl;
      @(posedge clk); #1;
      n = int'($floor(real'(d) / TAU));
      if (n > N) n = N;
      for (int k = 0; k < N; k++)
        check(taps[k] == ((k < n) ? lvl : !lvl), $sformatf("tap %0d, switch %0d ps before edge", k, d));
      @(posedge clk); #1;
      n = int'($floor(real'(d + 5000) / TAU));
      if (n > N) n = N;
      for (int k = 0; k < N; k++)
        check(taps[k] == ((k < n) ? lvl : !lvl), "one period later");
      @(posedge clk); #1;
      check(taps == {N{lvl}}, "all taps settled two periods later");
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
