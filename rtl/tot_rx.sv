// tot_rx: TOT Receiver. Sits directly on the RocketIO receiver output and
// strips TOT packets out of the ADC stream.
//
// Operation
//  * data_out/charisk_out follow rxdata/rxcharisk one clock later.
//  * When enabled and a TOT header arrives (K28.0 on both bytes with both
//    rxcharisk bits set), the decoder raises its mask for three cycles (header,
//    TOT word 1, TOT word 2). While masked, data_out carries the output of a
//    three-stage delay line, which replays the three words that came before
//    the header, and charisk_out is held at 00, hiding the header's K flag.
//  * The two words after the header are shifted into two clock-enabled
//    registers (ld_TOT); their outputs form tot_data = {word 2, word 1}, and
//    tot_flag is high for the one cycle after word 2, when tot_data first
//    holds the new value. tot_data keeps its value until the next packet.
//  * rx_busy is high while the two TOT words are being collected.
//  * When disabled everything, TOT packets included, passes through.
// Other K characters (K28.7 alignment) pass through with their flags.
//
// Follows the description: one-cycle latency, the three-word replay, the
// two clock-enabled capture registers, tot_flag and the transparent modes.
// This design's own choices: the header must appear on both bytes, charisk_out
// is forced to 00 (rather than replayed) during the masked cycles, the reset is
// synchronous and active high and clears tot_data, and rx_busy's definition.
module tot_rx
  import tot_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [15:0] rxdata,
  input  logic [1:0]  rxcharisk,
  output logic [15:0] data_out,
  output logic [1:0]  charisk_out,
  output logic [31:0] tot_data,
  output logic        tot_flag,
  output logic        rx_busy
);
  timeunit 1ps;
  timeprecision 1ps;


  logic [15:0] dly [3];           // rxdata delayed by 1, 2 and 3 cycles
  logic [15:0] cap_lo, cap_hi;    // capture registers (figure: two CE flops)
  logic [1:0]  words_left;        // TOT words still to capture
  logic        header, msk_d, ld_tot;

  assign header = enable && (words_left == 2'd0) &&
                  (rxcharisk == 2'b11) && (rxdata == TOT_HEADER);
  assign ld_tot = (words_left != 2'd0);
  assign msk_d  = header || ld_tot;
  assign rx_busy = ld_tot;

  always_ff @(posedge clk) begin
    dly[0] <= rxdata;
    dly[1] <= dly[0];
    dly[2] <= dly[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out    <= '0;
      charisk_out <= '0;
    end else begin
      data_out    <= msk_d ? dly[2] : rxdata;
      charisk_out <= msk_d ? 2'b00  : rxcharisk;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      words_left <= 2'd0;
    end else if (header) begin
      words_left <= 2'd2;
    end else if (ld_tot) begin
      words_left <= words_left - 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_lo   <= '0;
      cap_hi   <= '0;
      tot_flag <= 1'b0;
    end else begin
      if (ld_tot) begin
        cap_hi <= rxdata;
        cap_lo <= cap_hi;
      end
      tot_flag <= (words_left == 2'd1);
    end
  end

  assign tot_data = {cap_hi, cap_lo};

  a_flag_one_cycle: assert property (@(posedge clk) disable iff (rst)
    tot_flag |=> !tot_flag);

endmodule
