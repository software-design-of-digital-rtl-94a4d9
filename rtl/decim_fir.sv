// decim_fir: complex decimating low-pass FIR filter of the down converter.
//
// It filters the raw I and Q streams from the mixer and keeps one output in
// DECIM (60 MSPS in, 1 MSPS out for DECIM = 60). The cut-off is programmable
// by rewriting the coefficients, and a real-only mode outputs just the I
// channel (Q held at zero); both features follow the receiver description,
// which gives neither the filter length nor its taps.
//
// Structure (this design's choice): a polyphase accumulate-and-dump FIR of
// L = NMAC * DECIM taps, which computes only the outputs that are kept.
// Output m is y[m] = sum_{n=0}^{L-1} h[n] * x[m*DECIM + DECIM-1 - n]. Each
// channel holds NMAC partial sums, slot k belonging to the output that
// completes k blocks of DECIM samples later. An input sample at block phase p
// (0 .. DECIM-1) is multiplied by h[k*DECIM + DECIM-1-p] and added to slot k,
// for all k at once (NMAC multipliers per channel, coefficients shared by I
// and Q). At p = DECIM-1 slot 0 is complete: it is emitted, the slots move
// down by one and the last slot restarts from zero.
//
// Default taps (rtl/decim_fir_coef.hex, read relative to the repository
// root): 480-tap Hamming-windowed sinc with cut-off 450 kHz at fs = 60 MHz,
// signed Q1.15, scaled to sum to 32768 (unity DC gain): -0.4 dB at 300 kHz,
// -11 dB at 500 kHz, below -57 dB from 700 kHz on. The accumulated sum
// is shifted right by COEF_W-1 with round-half-up and saturated to OUT_W.
//
// Interface and timing:
//   in_valid/i_in/q_in: one complex sample per strobe (gaps allowed).
//   coef_we/coef_addr/coef_data: writes tap h[coef_addr]; takes effect for
//     the samples that arrive after the write.
//   out_valid: one strobe per DECIM input strobes, two cycles after the
//     strobe of the last sample of the block.
module decim_fir #(
  parameter int unsigned DECIM  = 60,
  parameter int unsigned NMAC   = 8,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned OUT_W  = 16,
  localparam int unsigned NTAPS = DECIM * NMAC,
  localparam int unsigned CA_W  = $clog2(NTAPS)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] i_in,
  input  logic signed [DATA_W-1:0] q_in,
  input  logic                     real_only,

  input  logic                     coef_we,
  input  logic [CA_W-1:0]          coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,

  output logic signed [OUT_W-1:0]  i_out,
  output logic signed [OUT_W-1:0]  q_out,
  output logic                     out_valid
);

  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(NTAPS);
  localparam int unsigned PH_W  = (DECIM > 1) ? $clog2(DECIM) : 1;
  localparam int unsigned SH    = COEF_W - 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  // ---------------- coefficient memory ----------------
  logic signed [COEF_W-1:0] coef [NTAPS];
  initial $readmemh("rtl/decim_fir_coef.hex", coef);

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_data;
  end

  // ---------------- stage A: block phase, tap fetch ----------------
  logic [PH_W-1:0]          phase;
  logic                     va, last_a;
  logic signed [DATA_W-1:0] xi_a, xq_a;
  logic signed [COEF_W-1:0] c_a [NMAC];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      va     <= 1'b0;
      last_a <= 1'b0;
      xi_a   <= '0;
      xq_a   <= '0;
      for (int k = 0; k < NMAC; k++) c_a[k] <= '0;
    end else begin
      va <= in_valid;
      if (in_valid) begin
        xi_a   <= i_in;
        xq_a   <= q_in;
        last_a <= (phase == PH_W'(DECIM - 1));
        phase  <= (phase == PH_W'(DECIM - 1)) ? '0 : phase + PH_W'(1);
        for (int k = 0; k < NMAC; k++)
          c_a[k] <= coef[CA_W'(k * DECIM) + CA_W'(DECIM - 1) - CA_W'(phase)];
      end
    end
  end

  // ---------------- stage B: multiply-accumulate, dump ----------------
  acc_t acc_i [NMAC];
  acc_t acc_q [NMAC];
  acc_t sum_i [NMAC];
  acc_t sum_q [NMAC];

  always_comb begin
    for (int k = 0; k < NMAC; k++) begin
      sum_i[k] = acc_i[k] + ACC_W'(xi_a * c_a[k]);
      sum_q[k] = acc_q[k] + ACC_W'(xq_a * c_a[k]);
    end
  end

  function automatic logic signed [OUT_W-1:0] scale(acc_t a);
    acc_t r, hi, lo;
    r  = (a + acc_t'(1 << (SH - 1))) >>> SH;
    hi = acc_t'((1 << (OUT_W - 1)) - 1);
    lo = -acc_t'(1 << (OUT_W - 1));
    if (r > hi)      return OUT_W'(hi);
    else if (r < lo) return OUT_W'(lo);
    else             return OUT_W'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NMAC; k++) begin
        acc_i[k] <= '0;
        acc_q[k] <= '0;
      end
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= va && last_a;
      if (va) begin
        if (last_a) begin
          i_out <= scale(sum_i[0]);
          q_out <= real_only ? '0 : scale(sum_q[0]);
          for (int k = 0; k < NMAC - 1; k++) begin
            acc_i[k] <= sum_i[k+1];
            acc_q[k] <= sum_q[k+1];
          end
          acc_i[NMAC-1] <= '0;
          acc_q[NMAC-1] <= '0;
        end else begin
          for (int k = 0; k < NMAC; k++) begin
            acc_i[k] <= sum_i[k];
            acc_q[k] <= sum_q[k];
          end
        end
      end
    end
  end

endmodule
