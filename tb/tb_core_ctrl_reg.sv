// tb_core_ctrl_reg: self-checking testbench for the Core Control Register.
// Writes random values and checks the read-back and the core_ctrl outputs
// (bits 7, 10 and 14 always zero), that bit 15 drives tdc_rst as a level,
// that other addresses neither write it nor read it, and the reset value.
module tb_core_ctrl_reg;
  timeunit 1ps;
  timeprecision 1ps;
  import tot_pkg::*;

  logic clk = 0, rst = 1;
  sc_req_t sc_req;
  logic [15:0] rd_data, core_ctrl;
  logic tdc_rst;
  int checks = 0, failures = 0;

  core_ctrl_reg dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    logic [15:0] v, model;
    sc_req = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #1 check(core_ctrl == 0 && !tdc_rst && rd_data == 0, "reset value");
    model = 0;
    for (int i = 0; i < 200; i++) begin
      v = 16'($urandom);
      sc_req.addr = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(1, 255)) : 32'h0;
      sc_req.wr = 1; sc_req.wdata = v;
      if (sc_req.addr == 0) model = v & ~16'h4480;
      @(posedge clk); #1;
      sc_req.wr = 0; sc_req.addr = 0; #1;
      check(core_ctrl == model && rd_data == model, $sformatf("value %h expected %h", core_ctrl, model));
      check(tdc_rst == model[15], "bit 15 is the TDC reset");
      sc_req.addr = 32'h50; #1;
      check(rd_data == 0, "no read at other address");
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
