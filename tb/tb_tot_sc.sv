// tb_tot_sc: self-checking testbench for the per-channel slow-control
// registers. Two instances, channel 1 (base 0x50, with receiver) and channel 2
// (base 0x60, without), share one bus. Checks: read/write of Control Mode and
// the test-data registers, the Rx-enable bit and Rx registers reading zero on
// the channel without a receiver, status and received-data read-back, the
// Control Pulse bits giving one-cycle test_valid and reset pulses and reading
// zero, and no response outside each block's address range. Then 4,000
// random reads and writes, at both blocks and at other addresses, are
// compared with a reference model of the two register sets.
module tb_tot_sc;
  timeunit 1ps;
  timeprecision 1ps;
  import tot_pkg::*;

  logic clk = 0, rst = 1;
  sc_req_t req;
  logic [15:0] rd [2];
  logic rx_busy = 0;
  logic [31:0] rx_tot_data = 0;
  logic [1:0] tx_en, rx_en, tmode, tvalid, crst;
  logic [31:0] tdata [2];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 2; c++) begin : g
    tot_sc #(.BASE_ADDR(c == 0 ? 32'h50 : 32'h60), .HAS_RX(c == 0)) dut (
      .clk(clk), .rst(rst), .sc_req(req), .rd_data(rd[c]), .rx_busy(rx_busy),
      .rx_tot_data(rx_tot_data), .tx_enable(tx_en[c]), .rx_enable(rx_en[c]),
      .tx_test_mode(tmode[c]), .test_valid(tvalid[c]), .test_data(tdata[c]),
      .chan_rst(crst[c]));
  end

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [15:0] d);
    req.addr = a; req.wr = 1; req.wdata = d;
    @(posedge clk); #1;
    req.wr = 0;
  endtask

  task automatic rdt(input logic [31:0] a, output logic [15:0] d);
    req.addr = a;
    #1 d = rd[0] | rd[1];
  endtask

  initial begin
    logic [15:0] v;
    logic [15:0] r [3];
    logic [2:0]  m_mode [2];
    logic [31:0] m_test [2];
    req = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(tx_en == 0 && rx_en == 0 && tmode == 0, "reset mode");
    // mode register
    wr(32'h51, 16'hFFFF); #1;
    rdt(32'h51, v); check(v == 16'h0007, $sformatf("ch1 mode %h", v));
    check(tx_en[0] && rx_en[0] && tmode[0], "ch1 mode outputs");
    wr(32'h61, 16'hFFFF); #1;
    rdt(32'h61, v); check(v == 16'h0005, $sformatf("ch2 mode %h (no Rx bit)", v));
    check(tx_en[1] && !rx_en[1] && tmode[1], "ch2 mode outputs");
    wr(32'h51, 16'h0001); #1;
    check(tx_en[0] && !rx_en[0] && !tmode[0], "ch1 mode rewritten");
    // test data
    wr(32'h53, 16'h1234); wr(32'h54, 16'hABCD); wr(32'h63, 16'h5555); wr(32'h64, 16'h6666);
    #1;
    check(tdata[0] == 32'hABCD_1234 && tdata[1] == 32'h6666_5555, "test data outputs");
    rdt(32'h53, r[0]);
    rdt(32'h54, r[1]);
    check(r[0] == 16'h1234 && r[1] == 16'hABCD, "ch1 test data readback");
    rdt(32'h63, r[0]);
    rdt(32'h64, r[1]);
    check(r[0] == 16'h5555 && r[1] == 16'h6666, "ch2 test data readback");
    // status and Rx data
    rx_busy = 1; rx_tot_data = 32'h8765_4321; #1;
    rdt(32'h50, r[0]);
    rdt(32'h60, r[1]);
    check(r[0] == 16'h0001 && r[1] == 16'h0000, "status busy bit");
    rdt(32'h55, r[0]);
    rdt(32'h56, r[1]);
    check(r[0] == 16'h4321 && r[1] == 16'h8765, "ch1 Rx data");
    rdt(32'h65, r[0]);
    rdt(32'h66, r[1]);
    check(r[0] == 16'h0 && r[1] == 16'h0, "ch2 Rx data reads zero");
    rx_busy = 0; #1;
    rdt(32'h50, r[0]);
    check(r[0] == 16'h0000, "status idle");
    // pulses
    check(tvalid == 0 && crst == 0, "no pulse before write");
    req.addr = 32'h52; req.wr = 1; req.wdata = 16'h0001;
    @(posedge clk); #1 req.wr = 0;
    check(tvalid == 2'b01 && crst == 2'b00, "test_valid pulse ch1");
    rdt(32'h52, r[0]);
    check(r[0] == 0, "pulse register reads zero");
    @(posedge clk); #1;
    check(tvalid == 2'b00, "test_valid lasts one cycle");
    wr(32'h62, 16'h0010); #1;
    check(crst == 2'b10 && tvalid == 2'b00, "reset pulse ch2");
    @(posedge clk); #1;
    check(crst == 2'b00, "reset pulse lasts one cycle");
    // outside the range
    rdt(32'h57, r[0]); rdt(32'h40, r[1]); rdt(32'h150, r[2]);
    check(r[0] == 0 && r[1] == 0 && r[2] == 0, "no response outside range");
    wr(32'h151, 16'h0000); #1;
    check(tx_en[0], "write to alias address ignored");
    // random bus traffic against a reference model of both register blocks
    m_mode = '{3'b001, 3'b101};
    m_test = '{32'hABCD_1234, 32'h6666_5555};
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] a;
      logic [15:0] e, wd;
      logic        w;
      logic [1:0]  e_tv, e_rst;
      int          c, kind;
      c = $urandom_range(0, 1);
      kind = $urandom_range(0, 9);
      unique case (kind)
        0:       a = $urandom;
        1:       a = {24'($urandom_range(1, 15)), 4'(c == 0 ? 5 : 6), 4'($urandom)};
        default: a = (c == 0 ? 32'h50 : 32'h60) + 32'($urandom_range(0, 7));
      endcase
      w = $urandom_range(0, 2) == 0;
      wd = 16'($urandom);
      rx_busy = 1'($urandom);
      rx_tot_data = $urandom;
      req.addr = a; req.wr = w; req.wdata = wd;
      #1;
      e = 16'd0;
      for (int k = 0; k < 2; k++)
        if (a[31:4] == (k == 0 ? 28'h5 : 28'h6) && a[3:0] <= 4'd6)
          unique case (a[3:0])
            4'd0: e = {15'd0, rx_busy && k == 0};
            4'd1: e = {13'd0, m_mode[k]};
            4'd3: e = m_test[k][15:0];
            4'd4: e = m_test[k][31:16];
            4'd5: e = k == 0 ? rx_tot_data[15:0] : 16'd0;
            4'd6: e = k == 0 ? rx_tot_data[31:16] : 16'd0;
            default: e = 16'd0;
          endcase
      check((rd[0] | rd[1]) == e, $sformatf("read %h: %h expected %h", a, rd[0] | rd[1], e));
      e_tv = 2'b00; e_rst = 2'b00;
      for (int k = 0; k < 2; k++)
        if (w && a[31:4] == (k == 0 ? 28'h5 : 28'h6))
          unique case (a[3:0])
            4'd1: m_mode[k] = {wd[2], wd[1] & (k == 0), wd[0]};
            4'd2: begin e_tv[k] = wd[0]; e_rst[k] = wd[4]; end
            4'd3: m_test[k][15:0] = wd;
            4'd4: m_test[k][31:16] = wd;
            default: ;
          endcase
      @(posedge clk); #1;
      req.wr = 0;
      check(tvalid == e_tv && crst == e_rst, "pulse outputs");
      for (int k = 0; k < 2; k++)
        check({tmode[k], rx_en[k], tx_en[k]} == m_mode[k] && tdata[k] == m_test[k],
              $sformatf("channel %0d mode/test outputs", k + 1));
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
