// ddc_receiver_top: FPGA side of a digital IF receiver for a cloud radar.
//
// A 70 MHz IF (with Doppler) is undersampled by a 16-bit ADC at 60 MSPS, so
// it appears at 10 MHz. This top joins the four parts of the FPGA design:
//   1. adc_ddr_capture: the ADC's eight double-data-rate LVDS lanes are split
//      into an even-bit FIFO and an odd-bit FIFO on CLKOUT+ and re-joined into
//      16-bit samples with the 180 MHz clock;
//   2. pingpong_fifo: the samples pass through two 16-bit FIFOs used in
//      ping-pong fashion and a multiplexer into the 60 MHz domain, giving
//      the raw ADC stream adc_sample;
//   3. ddc: oscillator at 10 MHz, complex mixer and decimate-by-60 low-pass
//      filter, giving I/Q at 1 MSPS;
//   4. adc_spi_master: writes and reads the ADC's mode-control registers.
// The clock manager (60 and 180 MHz plus locked) and the LVDS input buffers
// are FPGA primitives outside this RTL: their outputs are ports.
//
// Resets (this design's choice): rst or a low locked resets all domains;
// each domain releases its reset through its own two-flop synchroniser.
//
// Clock domains: adc_clkout (60 MHz from the ADC, both edges), clk_180,
// clk_60. capture_overflow is sticky in the adc_clkout domain, pp_overflow in
// the clk_180 domain; both clear only on reset.
module ddc_receiver_top
  import ddc_pkg::*;
#(
  parameter int unsigned DECIM           = 60,
  parameter int unsigned NMAC            = 8,
  parameter int unsigned FIFO_DEPTH_LOG2 = 4,
  parameter int unsigned PP_BLOCK_LEN    = 8,
  parameter int unsigned SPI_CLK_DIV     = 8,
  localparam int unsigned CA_W = $clog2(DECIM * NMAC)
) (
  input  logic               rst,
  input  logic               locked,
  input  logic               clk_60,
  input  logic               clk_180,

  // ADC data lanes after the LVDS input buffers
  input  logic               adc_clkout,
  input  logic [7:0]         adc_d,

  // ADC serial programming port
  input  logic               spi_start,
  input  logic               spi_rw,
  input  logic [6:0]         spi_addr,
  input  logic [7:0]         spi_wdata,
  output logic               spi_busy,
  output logic               spi_done,
  output logic [7:0]         spi_rdata,
  output logic               adc_ss_n,
  output logic               adc_sclk,
  output logic               adc_mosi,
  input  logic               adc_miso,

  // down converter configuration (clk_60 domain)
  input  logic [PHASE_W-1:0] tuning_word,
  input  logic               real_only,
  input  logic               coef_we,
  input  logic [CA_W-1:0]    coef_addr,
  input  logic signed [15:0] coef_data,

  // outputs (clk_60 domain unless noted)
  output sample_t            adc_sample,
  output logic               adc_sample_valid,
  output sample_t            i_out,
  output sample_t            q_out,
  output logic               iq_valid,
  output logic               capture_overflow,
  output logic               pp_overflow
);

  logic rst_any, rst_adc, rst_180, rst_60;
  assign rst_any = rst || !locked;

  reset_sync u_rs_adc (.clk(adc_clkout), .rst_in(rst_any), .rst_out(rst_adc));
  reset_sync u_rs_180 (.clk(clk_180),    .rst_in(rst_any), .rst_out(rst_180));
  reset_sync u_rs_60  (.clk(clk_60),     .rst_in(rst_any), .rst_out(rst_60));

  // ---- ADC capture (CLKOUT+ -> 180 MHz) ----
  logic [15:0] cap_sample;
  logic        cap_valid, cap_ovf;

  adc_ddr_capture #(.FIFO_DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_capture (
    .adc_clkout, .adc_rst(rst_adc), .adc_d,
    .clk_180, .rst_180,
    .sample(cap_sample), .sample_valid(cap_valid), .overflow(cap_ovf)
  );

  always_ff @(posedge adc_clkout) begin
    if (rst_adc)      capture_overflow <= 1'b0;
    else if (cap_ovf) capture_overflow <= 1'b1;
  end

  // ---- ping-pong FIFOs (180 MHz -> 60 MHz) ----
  logic [15:0] final_data;
  logic        final_valid, pp_ovf;

  pingpong_fifo #(.WIDTH(16), .DEPTH_LOG2(FIFO_DEPTH_LOG2),
                  .BLOCK_LEN(PP_BLOCK_LEN)) u_pingpong (
    .wr_clk(clk_180), .wr_rst(rst_180), .wr_en(cap_valid), .wr_data(cap_sample),
    .rd_clk(clk_60),  .rd_rst(rst_60),
    .final_data, .final_valid,
    .wr_sel(), .rd_sel(), .overflow(pp_ovf)
  );

  always_ff @(posedge clk_180) begin
    if (rst_180)     pp_overflow <= 1'b0;
    else if (pp_ovf) pp_overflow <= 1'b1;
  end

  assign adc_sample       = sample_t'(final_data);
  assign adc_sample_valid = final_valid;

  // ---- digital down converter (60 MHz) ----
  ddc #(.DECIM(DECIM), .NMAC(NMAC)) u_ddc (
    .clk(clk_60), .rst(rst_60),
    .in_valid(final_valid), .x(sample_t'(final_data)),
    .tuning_word, .real_only, .coef_we, .coef_addr, .coef_data,
    .i_out, .q_out, .out_valid(iq_valid)
  );

  // ---- ADC register programming (60 MHz) ----
  adc_spi_master #(.CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clk(clk_60), .rst(rst_60),
    .start(spi_start), .rw(spi_rw), .addr(spi_addr), .wdata(spi_wdata),
    .busy(spi_busy), .done(spi_done), .rdata(spi_rdata),
    .ss_n(adc_ss_n), .sclk(adc_sclk), .mosi(adc_mosi), .miso(adc_miso)
  );

endmodule
