// tb_ddc: end-to-end test of the digital down converter (oscillator, mixer,
// decimating filter) with the receiver's own numbers.
//
// A 10.3 MHz tone of amplitude A = 16000 sampled at 60 MSPS (the undersampled
// 70 MHz IF plus Doppler) is mixed with the 10 MHz oscillator and decimated
// by 60. The 1 MSPS output must be a complex tone at 300 kHz:
//   - one output per 60 input samples, 5 cycles after the block's last one;
//   - envelope sqrt(I^2 + Q^2) = A/2 * |H(300 kHz)| within 3 %, where |H| is
//     computed here by a direct DTFT of the filter taps; a constant envelope
//     also shows the 20.3 MHz mixing product was removed;
//   - I changes sign 0.6 times per output sample (300 kHz at 1 MSPS);
//   - with I = x*cos and Q = x*sin a tone above the oscillator frequency
//     makes (I, Q) turn clockwise from one output to the next.
// Then a 15 MHz tone (5 MHz from the oscillator, far in the stop band) must
// come out below 1 % of A/2.
module tb_ddc;
  import ddc_pkg::*;
  localparam int D = 60, K = 8, L = D * K;
  localparam real PI = 3.141592653589793;
  localparam real FS = 60.0e6;
  localparam real A = 16000.0;

  logic clk = 0, rst = 1, in_valid = 0;
  sample_t x = 0, i_out, q_out;
  logic out_valid;
  logic coef_we = 0;
  logic [8:0] coef_addr = 0;
  logic signed [15:0] coef_data = 0;

  int checks = 0, failures = 0;
  logic [15:0] h_file [L];
  real f_in = 10.3e6;
  int n_in = 0, n_out = 0, cyc = 0, last_cyc = 0, zc = 0;
  real env_min = 1.0e9, env_max = 0.0;
  logic signed [15:0] last_i = 0, last_q = 0;
  int n_neg_rot = 0, n_meas = 0;

  always #8 clk = ~clk;
  always @(posedge clk) cyc++;

  ddc #(.DECIM(D), .NMAC(K)) dut (
    .clk, .rst, .in_valid, .x, .tuning_word(TUNE_10MHZ_AT_60MSPS), .real_only(1'b0),
    .coef_we, .coef_addr, .coef_data, .i_out, .q_out, .out_valid);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real h_mag(real f);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < L; n++) begin
      re += real'($signed(h_file[n])) * $cos(2.0 * PI * f / FS * n);
      im -= real'($signed(h_file[n])) * $sin(2.0 * PI * f / FS * n);
    end
    return $sqrt(re * re + im * im) / 32768.0;
  endfunction

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      n_in++;
      if (n_in % D == 0) last_cyc = cyc;
    end
    if (!rst && out_valid) begin
      real env;
      n_out++;
      check(cyc - last_cyc == 5, $sformatf("latency %0d", cyc - last_cyc));
      // skip the filter's start-up (K blocks)
      if (n_out > K + 1) begin
        env = $sqrt(real'(i_out) * real'(i_out) + real'(q_out) * real'(q_out));
        if (env < env_min) env_min = env;
        if (env > env_max) env_max = env;
        if ((i_out < 0) != (last_i < 0)) zc++;
        // I = x*cos, Q = x*sin: a tone above the oscillator turns clockwise
        if (real'(last_i) * real'(q_out) - real'(last_q) * real'(i_out) < 0.0) n_neg_rot++;
        n_meas++;
      end
      last_i = i_out;
      last_q = q_out;
    end
  end

  task automatic stream(int nsamp);
    for (int n = 0; n < nsamp; n++) begin
      @(posedge clk);
      in_valid <= 1;
      x <= sample_t'($rtoi($floor(A * $cos(2.0 * PI * f_in / FS * n) + 0.5)));
    end
    @(posedge clk) in_valid <= 0;
    repeat (8) @(posedge clk);
  endtask

  initial begin
    real g, expect_env;
    $readmemh("rtl/decim_fir_coef.hex", h_file);
    g = h_mag(300.0e3);
    expect_env = A / 2.0 * g;
    repeat (3) @(posedge clk);
    rst <= 0;
    stream(D * 105);
    check(n_out == 105, $sformatf("outputs %0d for 105 blocks", n_out));
    check(env_min > 0.97 * expect_env && env_max < 1.03 * expect_env,
          $sformatf("envelope %f..%f expected %f", env_min, env_max, expect_env));
    check(n_neg_rot == n_meas, $sformatf("clockwise rotation in %0d of %0d outputs", n_neg_rot, n_meas));
    check(zc >= 58 && zc <= 62, $sformatf("I sign changes %0d in 100 outputs (expect 60)", zc));
    // stop band: 15 MHz tone
    @(posedge clk) rst <= 1;
    @(posedge clk) rst <= 0;
    n_in = 0; n_out = 0; n_meas = 0; n_neg_rot = 0; env_min = 1.0e9; env_max = 0.0; zc = 0;
    f_in = 15.0e6;
    stream(D * 30);
    check(n_out == 30, "outputs for the stop-band tone");
    check(env_max < 0.01 * A / 2.0, $sformatf("stop-band output %f", env_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
