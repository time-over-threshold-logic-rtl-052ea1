// tot_sc: slow-control interface of one TOT TX/RX channel. A block of seven
// 16-bit registers at BASE_ADDR + 0..6:
//   +0 Status        RO  bit 0: TOT Rx busy
//   +1 Control Mode  RW  bit 0: enable TOT Tx, bit 1: enable TOT Rx,
//                        bit 2: TOT Tx test mode
//   +2 Control Pulse WO  bit 0: test_valid (send the test word),
//                        bit 4: reset TOT Tx (and Rx); reads as zero
//   +3 Test Data LSB RW  bits 15:0 of the test word
//   +4 Test Data MSB RW  bits 31:16 of the test word
//   +5 Data Rx LSB   RO  bits 15:0 of the last word received by TOT Rx
//   +6 Data Rx MSB   RO  bits 31:16 of the last word received by TOT Rx
// On a channel without a receiver (HAS_RX = 0) the Rx bits and registers are
// not implemented: writes have no effect and they read zero. Unlisted bits
// also read zero.
//
// Bus: sc_req carries an address, a one-cycle write strobe and write data;
// a write takes effect at the clock edge. rd_data is combinational from the
// address and is zero when the address is outside this block, so several
// blocks' read data can be ORed. The pulse outputs are high for exactly the
// one cycle after the write.
// The register map and bit meanings follow the description; the bus protocol
// and the reset values (all zero) are this design's choices.
module tot_sc
  import tot_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h0000_0050,
  parameter bit          HAS_RX    = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  sc_req_t     sc_req,
  output logic [15:0] rd_data,
  input  logic        rx_busy,
  input  logic [31:0] rx_tot_data,
  output logic        tx_enable,
  output logic        rx_enable,
  output logic        tx_test_mode,
  output logic        test_valid,
  output logic [31:0] test_data,
  output logic        chan_rst
);
  timeunit 1ps;
  timeprecision 1ps;

  logic       hit;
  logic [3:0] off;
  logic [2:0] mode;

  assign off = sc_req.addr[3:0];
  assign hit = (sc_req.addr[31:4] == BASE_ADDR[31:4]) && (off <= OFF_RX_MSB);

  always_ff @(posedge clk) begin
    if (rst) begin
      mode       <= '0;
      test_data  <= '0;
      test_valid <= 1'b0;
      chan_rst   <= 1'b0;
    end else begin
      test_valid <= 1'b0;
      chan_rst   <= 1'b0;
      if (hit && sc_req.wr) begin
        unique case (off)
          OFF_MODE:     mode <= {sc_req.wdata[2], sc_req.wdata[1] & HAS_RX,
                                 sc_req.wdata[0]};
          OFF_PULSE: begin
            test_valid <= sc_req.wdata[0];
            chan_rst   <= sc_req.wdata[4];
          end
          OFF_TEST_LSB: test_data[15:0]  <= sc_req.wdata;
          OFF_TEST_MSB: test_data[31:16] <= sc_req.wdata;
          default: ;
        endcase
      end
    end
  end

  assign tx_enable    = mode[0];
  assign rx_enable    = mode[1];
  assign tx_test_mode = mode[2];

  always_comb begin
    rd_data = '0;
    if (hit) begin
      unique case (off)
        OFF_STATUS:   rd_data = {15'd0, rx_busy & HAS_RX};
        OFF_MODE:     rd_data = {13'd0, mode};
        OFF_TEST_LSB: rd_data = test_data[15:0];
        OFF_TEST_MSB: rd_data = test_data[31:16];
        OFF_RX_LSB:   rd_data = HAS_RX ? rx_tot_data[15:0]  : 16'd0;
        OFF_RX_MSB:   rd_data = HAS_RX ? rx_tot_data[31:16] : 16'd0;
        default:      rd_data = '0;   // Control Pulse reads zero
      endcase
    end
  end

endmodule
