// ddc_pkg: widths, types and default constants shared by the receiver.
//
// The ADC delivers 16-bit samples at 60 MSPS; the local oscillator is a
// 16-bit sine/cosine pair; the decimating filter brings 60 MSPS down to
// 1 MSPS (factor 60). The 16-bit widths and the 60 MSPS / 10 MHz / 1 MSPS
// rates follow the receiver description; the phase accumulator width and
// the SPI frame type are this design's choices.
package ddc_pkg;

  localparam int unsigned SAMPLE_W = 16;   // ADC sample and NCO output width
  localparam int unsigned PHASE_W  = 32;   // NCO phase accumulator width

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // round(2^32 * 10 MHz / 60 MHz): the 70 MHz IF undersampled at 60 MSPS
  // appears at 10 MHz, and the NCO is tuned there.
  localparam logic [PHASE_W-1:0] TUNE_10MHZ_AT_60MSPS = 32'd715827883;

  // One complex baseband sample.
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // The 16-bit word sent to the ADC's serial port, first bit first.
  typedef struct packed {
    logic       rw;     // 1 = read back, 0 = write
    logic [6:0] addr;   // register address A6:A0
    logic [7:0] data;   // register data D7:D0
  } spi_word_t;

endpackage
