// adc_ddr_capture: de-multiplexes the ADC's double-data-rate LVDS outputs.
//
// The ADC drives its 16 data bits on 8 lanes, two bits per lane: lane k
// carries bit 2k (even) while CLKOUT+ is low and bit 2k+1 (odd) while CLKOUT+
// is high. As the receiver description has it, the even bits go into an
// 8-bit "even" FIFO and the odd bits into an 8-bit "odd" FIFO, and both are
// read with the 180 MHz clock from the clock manager, where each even/odd
// pair is joined back into the 16-bit sample data(15:0).
//
// Edge choice (this design's reading of "appear when CLKOUT+ is low/high"):
// the even FIFO writes at the rising edge of CLKOUT+, which ends the low
// phase, and the odd FIFO at the falling edge, which ends the high phase. An
// even word and the odd word written half a period later form one sample;
// the pairing is kept by the FIFO order.
//
// Interface and timing:
//   adc_clkout / adc_d: single-ended CLKOUT+ and data lanes after the
//     differential input buffers. After adc_rst the even FIFO writes at
//     every rising edge and the odd FIFO at every falling edge that follows
//     an even write (the ADC streams continuously). adc_rst is synchronous
//     to the rising edge.
//   clk_180 domain: both FIFOs are popped together whenever both hold data;
//     sample/sample_valid follow one clk_180 cycle later (registered read).
//   overflow: a lane FIFO was full and dropped a word (CLKOUT+ domain,
//     either edge). At 60 MSPS in and up to 180 MHz out this does not happen
//     unless the read side is held in reset.
module adc_ddr_capture #(
  parameter int unsigned FIFO_DEPTH_LOG2 = 4
) (
  input  logic        adc_clkout,
  input  logic        adc_rst,
  input  logic [7:0]  adc_d,

  input  logic        clk_180,
  input  logic        rst_180,
  output logic [15:0] sample,
  output logic        sample_valid,
  output logic        overflow
);

  logic [7:0] evn_data, odd_data;
  logic       evn_empty, odd_empty, evn_valid, odd_valid;
  logic       evn_full, odd_full, evn_ovf, odd_ovf;
  logic       rd_both;
  logic       adc_clkout_n;
  logic       evn_live;   // the even FIFO wrote at the last rising edge

  // The odd lane is written on the falling edge of CLKOUT+.
  assign adc_clkout_n = ~adc_clkout;

  // The odd half of a sample is stored only if its even half was: after
  // reset the first odd write follows the first even write, so the n-th
  // words of the two FIFOs always belong to the same sample.
  always_ff @(posedge adc_clkout) begin
    if (adc_rst) evn_live <= 1'b0;
    else         evn_live <= 1'b1;
  end

  async_fifo #(.WIDTH(8), .DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_fifo_evn (
    .wr_clk (adc_clkout),   .wr_rst (adc_rst), .wr_en (1'b1), .wr_data (adc_d),
    .full   (evn_full),     .overflow (evn_ovf),
    .rd_clk (clk_180),      .rd_rst (rst_180), .rd_en (rd_both),
    .rd_data(evn_data),     .rd_valid (evn_valid), .empty (evn_empty)
  );

  async_fifo #(.WIDTH(8), .DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_fifo_odd (
    .wr_clk (adc_clkout_n), .wr_rst (adc_rst), .wr_en (evn_live), .wr_data (adc_d),
    .full   (odd_full),     .overflow (odd_ovf),
    .rd_clk (clk_180),      .rd_rst (rst_180), .rd_en (rd_both),
    .rd_data(odd_data),     .rd_valid (odd_valid), .empty (odd_empty)
  );

  assign rd_both  = !evn_empty && !odd_empty;
  assign overflow = evn_ovf || odd_ovf;

  // Re-interleave: sample bit 2k = even lane bit k, bit 2k+1 = odd lane bit k.
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      sample[2*k]   = evn_data[k];
      sample[2*k+1] = odd_data[k];
    end
  end
  assign sample_valid = evn_valid;

  // Both FIFOs are always popped together.
  a_lanes_in_step: assert property (@(posedge clk_180) disable iff (rst_180)
                                    evn_valid == odd_valid);

endmodule
