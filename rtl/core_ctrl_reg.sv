// core_ctrl_reg: the Digitizer Core Control Register at ADDR (0x0000_0000).
// A 16-bit read/write register; only bit 15 belongs to the TOT logic: while
// it is set the TOT TDC is held in reset (tdc_rst). The other bits are the
// Core's existing controls, kept here so the register reads back as a whole
// and brought out on core_ctrl:
//   0 laser enable, 1 laser disable, 2 laser reset (active low), 3 LED 7,
//   4 shdn_c (pre-amp signal), 5 laser RX enable, 6 laser SQ enable,
//   8 reset other DCMs, 9 enable transmission of inhibit,
//   11 reset trigger block, 12 reset Srom and reload RAM, 13 RAM test enable,
//   15 reset TOT TDC.
// Bits 7, 10 and 14 have no function and read zero.
// Bus as in tot_sc: write at the clock edge, combinational read data that is
// zero outside this register. The bit assignments follow the description;
// treating bit 15 as a level (held until cleared), the all-zero reset value
// and the bus protocol are this design's choices.
module core_ctrl_reg
  import tot_pkg::*;
#(
  parameter logic [31:0] ADDR = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  sc_req_t     sc_req,
  output logic [15:0] rd_data,
  output logic [15:0] core_ctrl,
  output logic        tdc_rst
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [15:0] USED = 16'b1011_1011_0111_1111;

  always_ff @(posedge clk) begin
    if (rst)                                 core_ctrl <= '0;
    else if (sc_req.wr && sc_req.addr == ADDR) core_ctrl <= sc_req.wdata & USED;
  end

  assign tdc_rst = core_ctrl[15];
  assign rd_data = (sc_req.addr == ADDR) ? core_ctrl : 16'd0;

endmodule
