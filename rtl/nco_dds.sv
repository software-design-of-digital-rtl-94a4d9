// nco_dds: numerically controlled oscillator (direct digital synthesizer),
// the local oscillator of the down converter.
//
// It produces a 16-bit sine and a 16-bit cosine, 90 degrees apart, one pair
// per input sample, at the frequency tuning_word * fs / 2^PHASE_W (DC to
// fs/2). With fs = 60 MSPS the default tuning word 715827883 gives 10 MHz,
// the frequency at which the 70 MHz IF appears after undersampling.
//
// How it works (this design's choice; the document uses a vendor DDS core):
// a PHASE_W-bit phase accumulator is stepped by tuning_word on every en; its
// top LUT_AW+2 bits address a quarter-wave table of 2^LUT_AW entries. The
// quadrant bits select forward/backward table reading and the sign; the
// cosine uses the phase advanced by a quarter turn. The table holds
// round(32767 * sin(pi/2 * (i + 0.5) / 2^LUT_AW)), i = 0 .. 2^LUT_AW-1; the
// half-step offset makes the four quadrants exact mirror images. It is read
// from rtl/nco_sine_qtr.hex (path relative to the repository root).
//
// Timing: en in cycle t uses the phase accumulated before t (the first sample
// after reset has phase 0: sine = +table[0], cosine = +table[max]); sine,
// cosine and out_valid appear two cycles after en.
module nco_dds #(
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned LUT_AW  = 8,
  parameter int unsigned OUT_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [PHASE_W-1:0]      tuning_word,
  output logic signed [OUT_W-1:0] sine,
  output logic signed [OUT_W-1:0] cosine,
  output logic                    out_valid
);

  localparam int unsigned PA_W = LUT_AW + 2;   // phase bits used for lookup

  logic [OUT_W-1:0] lut [2**LUT_AW];
  initial $readmemh("rtl/nco_sine_qtr.hex", lut);

  logic [PHASE_W-1:0] phase;
  logic [PA_W-1:0]    ph_s, ph_c;

  assign ph_s = phase[PHASE_W-1 -: PA_W];
  assign ph_c = ph_s + PA_W'(2**LUT_AW);       // +90 degrees

  // Table address for a phase: quadrants 1 and 3 read the table backwards.
  function automatic logic [LUT_AW-1:0] lut_addr(logic [PA_W-1:0] p);
    return p[LUT_AW] ? ~p[LUT_AW-1:0] : p[LUT_AW-1:0];
  endfunction

  // Stage 1: table read and sign bit.
  logic [OUT_W-1:0] mag_s, mag_c;
  logic             neg_s, neg_c, v1;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      v1    <= 1'b0;
      mag_s <= '0;
      mag_c <= '0;
      neg_s <= 1'b0;
      neg_c <= 1'b0;
    end else begin
      v1 <= en;
      if (en) begin
        phase <= phase + tuning_word;
        mag_s <= lut[lut_addr(ph_s)];
        mag_c <= lut[lut_addr(ph_c)];
        neg_s <= ph_s[PA_W-1];               // quadrants 2 and 3 are negative
        neg_c <= ph_c[PA_W-1];
      end
    end
  end

  // Stage 2: apply the sign.
  always_ff @(posedge clk) begin
    if (rst) begin
      sine      <= '0;
      cosine    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        sine   <= neg_s ? -$signed(mag_s) : $signed(mag_s);
        cosine <= neg_c ? -$signed(mag_c) : $signed(mag_c);
      end
    end
  end

endmodule
