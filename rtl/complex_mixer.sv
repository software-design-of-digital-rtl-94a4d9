// complex_mixer: the digital mixer of the down converter, two signed
// multipliers working at the full sample rate.
//
// Each ADC sample x is multiplied by the local oscillator's cosine and sine
// samples: i_out = x * cos, q_out = x * sin. Mixing the 10 MHz alias of the IF
// with a 10 MHz oscillator leaves the difference frequency near DC plus the
// sum frequency near 20 MHz, which the following low-pass filter removes.
// The two multipliers follow the receiver description; the naming (I from the
// cosine) and the output scaling are this design's choices: the 2*IN_W-bit
// product is shifted right by IN_W-1 with round-half-up and saturated to
// OUT_W bits, so a full-scale oscillator (32767) passes x at unity gain.
//
// Timing: one register stage; out_valid and the products appear one cycle
// after in_valid.
module complex_mixer #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  sine,
  input  logic signed [IN_W-1:0]  cosine,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out,
  output logic                    out_valid
);

  localparam int unsigned P_W = 2 * IN_W;
  localparam int unsigned SH  = IN_W - 1;

  function automatic logic signed [OUT_W-1:0] scale(logic signed [P_W-1:0] p);
    logic signed [P_W:0] r;
    logic signed [P_W:0] hi, lo;
    r  = (P_W+1)'(p) + (P_W+1)'(1 << (SH - 1));
    r  = r >>> SH;
    hi = (P_W+1)'((1 << (OUT_W - 1)) - 1);
    lo = -(P_W+1)'(1 << (OUT_W - 1));
    if (r > hi)      return OUT_W'(hi);
    else if (r < lo) return OUT_W'(lo);
    else             return OUT_W'(r);
  endfunction

  logic signed [P_W-1:0] prod_i, prod_q;
  assign prod_i = x * cosine;
  assign prod_q = x * sine;

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= scale(prod_i);
        q_out <= scale(prod_q);
      end
    end
  end

endmodule
