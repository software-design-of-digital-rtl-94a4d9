// ddc: digital down converter, the heart of the receiver.
//
// The ADC samples the 70 MHz IF at 60 MSPS (band-pass sampling), so the
// signal appears at 10 MHz. The down converter multiplies each sample by a
// 10 MHz cosine and sine from the local oscillator (complex mixer) and
// low-pass filters and decimates the products by 60, giving complex baseband
// samples at 1 MSPS. This chain (oscillator, two multipliers, decimating
// low-pass filter) follows the receiver description; the sub-blocks' inner
// structure is described in their own files.
//
// Interface and timing:
//   in_valid/x: one ADC sample (two's complement) per strobe; the oscillator
//     steps once per strobe, so it runs at the sample rate.
//   tuning_word: oscillator frequency, tuning_word * fs / 2^32.
//   real_only, coef_*: passed to the filter.
//   i_out/q_out/out_valid: one output per DECIM input samples; latency from
//     the strobe of the last sample of a block to out_valid is 5 cycles
//     (oscillator 2, mixer 1, filter 2).
module ddc
  import ddc_pkg::*;
#(
  parameter int unsigned DECIM = 60,
  parameter int unsigned NMAC  = 8,
  localparam int unsigned CA_W = $clog2(DECIM * NMAC)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  sample_t             x,
  input  logic [PHASE_W-1:0]  tuning_word,
  input  logic                real_only,
  input  logic                coef_we,
  input  logic [CA_W-1:0]     coef_addr,
  input  logic signed [15:0]  coef_data,
  output sample_t             i_out,
  output sample_t             q_out,
  output logic                out_valid
);

  sample_t sine, cosine, mix_i, mix_q;
  sample_t x_d1, x_d2;
  logic    lo_valid, mix_valid;

  nco_dds #(.PHASE_W(PHASE_W), .LUT_AW(8), .OUT_W(SAMPLE_W)) u_nco (
    .clk, .rst, .en(in_valid), .tuning_word,
    .sine, .cosine, .out_valid(lo_valid)
  );

  // Delay the sample by the oscillator's two-cycle latency.
  always_ff @(posedge clk) begin
    if (rst) begin
      x_d1 <= '0;
      x_d2 <= '0;
    end else begin
      x_d1 <= x;
      x_d2 <= x_d1;
    end
  end

  complex_mixer #(.IN_W(SAMPLE_W), .OUT_W(SAMPLE_W)) u_mixer (
    .clk, .rst, .in_valid(lo_valid), .x(x_d2), .sine, .cosine,
    .i_out(mix_i), .q_out(mix_q), .out_valid(mix_valid)
  );

  decim_fir #(.DECIM(DECIM), .NMAC(NMAC), .DATA_W(SAMPLE_W), .COEF_W(16),
              .OUT_W(SAMPLE_W)) u_lpf (
    .clk, .rst, .in_valid(mix_valid), .i_in(mix_i), .q_in(mix_q), .real_only,
    .coef_we, .coef_addr, .coef_data,
    .i_out, .q_out, .out_valid
  );

endmodule
