// tb_tot_tdc: self-checking testbench for the complete TOT TDC, delay-chain
// models included. Two TDCs see the same inhibit line: one with the element
// delay of a cold device (5 ns = 105 elements) and one with that of a hot
// device (5 ns = 104 elements). Inhibit pulses of random length (20 ns to
// 2 us) and random phase against the 5 ns TDC clock (30 % duty) are applied,
// with 10 ns sync pulses in between. For every pulse and each TDC the
// testbench works out from the edge times it drove, with tau its element
// delay:
//   CLK_r, CLK_f = first clock edges at least tau after the rising and
//                  falling edges of inhibit,
//   T_course = (CLK_f - CLK_r) / 5 ns,
//   T_fine   = floor((CLK_r - rise) / tau) - floor((CLK_f - fall) / tau),
//   T_ref    = distance in taps between the two like clock transitions the
//              reference chain shows (105 cold, 104 hot),
// and checks tot_data against them, that tot_valid comes exactly three
// edges after CLK_f and lasts one cycle, that the reconstructed duration
// (T_course + T_fine / T_ref) x 5 ns is within two elements of the truth, and
// that sync pulses give no tot_valid.
module tb_tot_tdc;
  timeunit 1ps;
  timeprecision 1ps;
  import tot_pkg::*;

  localparam real TAU [2] = '{5000.0 / 105.0, 5000.0 / 104.0};
  localparam real SKEW = 2666.7;
  logic clk = 0, rst = 1, inhibit = 0;
  tot_word_t tot_data [2];
  logic      tot_valid [2];
  int checks = 0, failures = 0;
  int valids [2] = '{0, 0}, pulses = 0, syncs = 0;
  int edge_no = 0;
  int valid_edge [2];
  tot_word_t valid_data [2];

  tot_tdc dut_cold (.clk(clk), .rst(rst), .inhibit(inhibit),
                    .tot_data(tot_data[0]), .tot_valid(tot_valid[0]));
  tot_tdc #(.TAU_PS(5000.0 / 104.0)) dut_hot (.clk(clk), .rst(rst), .inhibit(inhibit),
                    .tot_data(tot_data[1]), .tot_valid(tot_valid[1]));

  // TDC clock: rising edges at 3500 + k * 5000 ps, high for 1500 ps
  initial forever begin #3500 clk = 1; #1500 clk = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // record each tot_valid: the number of the edge that ends its cycle
  always @(posedge clk) begin
    edge_no++;
    for (int d = 0; d < 2; d++)
      if (tot_valid[d]) begin
        valids[d]++;
        valid_edge[d] = edge_no;
        valid_data[d] = tot_data[d];
      end
  end

  function automatic real first_edge_after(real t);
    return 3500.0 + 5000.0 * $ceil((t - 3500.0) / 5000.0);
  endfunction

  function automatic int edge_index(real t);   // edge at time t is number ...
    return int'((t - 3500.0) / 5000.0) + 1;
  endfunction

  initial begin
    real r, f, clk_r, clk_f, dur, meas;
    int exp_course, exp_fine, exp_ref, d0, len, v0 [2];
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      if (i % 3 == 0) begin
        v0 = valids;
        #($urandom_range(100, 4900));
        inhibit = 1; #10000 inhibit = 0;
        syncs++;
        repeat (12) @(posedge clk);
        check(valids == v0, "no tot_valid for a 10 ns sync");
      end
      v0 = valids;
      d0 = $urandom_range(1, 4999);
      len = (i < 20) ? 20000 + $urandom_range(0, 5000) : $urandom_range(20000, 2000000);
      @(posedge clk);
      #(d0);
      inhibit = 1; r = $realtime;
      #(len);
      inhibit = 0; f = $realtime;
      repeat (8) @(posedge clk);
      #1;
      pulses++;
      for (int d = 0; d < 2; d++) begin
        clk_r = first_edge_after(r + TAU[d]);
        clk_f = first_edge_after(f + TAU[d]);
        exp_course = int'((clk_f - clk_r) / 5000.0);
        exp_fine = int'($floor((clk_r - r) / TAU[d])) - int'($floor((clk_f - f) / TAU[d]));
        exp_ref = int'($floor((8500.0 - SKEW) / TAU[d])) - int'($floor((3500.0 - SKEW) / TAU[d]));
        check(valids[d] == v0[d] + 1, "one tot_valid per pulse");
        // the cycle starting three edges after CLK_f ends at edge CLK_f + 4
        check(valid_edge[d] == edge_index(clk_f) + 4,
              $sformatf("tot_valid timing: edge %0d, CLK_f edge %0d", valid_edge[d], edge_index(clk_f)));
        check(valid_data[d].t_course == 16'(exp_course),
              $sformatf("T_course %0d expected %0d", valid_data[d].t_course, exp_course));
        check(int'(valid_data[d].t_fine) == exp_fine,
              $sformatf("T_fine %0d expected %0d", valid_data[d].t_fine, exp_fine));
        check(int'(valid_data[d].t_ref) == exp_ref,
              $sformatf("T_ref %0d expected %0d", valid_data[d].t_ref, exp_ref));
        dur = f - r;
        meas = (real'(valid_data[d].t_course) + real'(valid_data[d].t_fine) / real'(valid_data[d].t_ref)) * 5000.0;
        check(meas - dur < 2.0 * TAU[d] && dur - meas < 2.0 * TAU[d],
              $sformatf("duration %0.1f ps measured %0.1f ps", dur, meas));
      end
    end
    check(pulses == 200 && valids[0] == 200 && valids[1] == 200, "all pulses measured");
    $display("pulses=%0d syncs=%0d results cold=%0d hot=%0d", pulses, syncs, valids[0], valids[1]);
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
