// tb_ddc_receiver_top: end-to-end test of the receiver at its default sizes
// (decimation 60, 480 taps, 16-deep FIFOs, ping-pong blocks of 8).
//
// The testbench plays the parts outside the FPGA: the clock manager (60 and
// 180 MHz, locked), the ADC's double-data-rate LVDS output (after the input
// buffers) and the ADC's serial register port (adc_spi_model). The ADC sends
// a 10.3 MHz tone of amplitude 16000 with +-8 LSB of random noise at 60 MSPS:
// the undersampled 70 MHz IF plus Doppler.
//
// Checks:
//   - SPI: four register writes, then read-back of each, values compared;
//   - raw path: every ADC sample captured after reset reaches adc_sample
//     through the even/odd FIFOs, the ping-pong FIFOs and the MUX, in order;
//   - DDC: one I/Q output per 60 samples; a 300 kHz complex tone of envelope
//     A/2*|H(300 kHz)| within 3 % (|H| from a DTFT of the default taps);
//   - real-only mode: Q is zero, I unchanged in envelope;
//   - coefficient port: taps rewritten at half scale, envelope halves;
//   - retuning the oscillator to 10.3 MHz: the output moves to DC (I and Q
//     stop changing sign);
//   - no FIFO overflow.
// Each mechanism (ping-pong switch both sides, MUX on PP2, SPI write and
// read, real-only output, coefficient write, retune) is counted, and one
// that never happened counts as a failure.
module tb_ddc_receiver_top;
  import ddc_pkg::*;
  localparam int D = 60, L = 480, K = 8;
  localparam real PI = 3.141592653589793;
  localparam real A = 16000.0;

  logic rst = 1, locked = 0;
  logic clk_60 = 0, clk_180 = 0, adc_clkout = 0;
  logic [7:0] adc_d = '0;
  logic spi_start = 0, spi_rw = 0;
  logic [6:0] spi_addr = '0;
  logic [7:0] spi_wdata = '0, spi_rdata;
  logic spi_busy, spi_done, adc_ss_n, adc_sclk, adc_mosi, adc_miso;
  logic [31:0] tuning_word = TUNE_10MHZ_AT_60MSPS;
  logic real_only = 0, coef_we = 0;
  logic [8:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  sample_t adc_sample, i_out, q_out;
  logic adc_sample_valid, iq_valid, capture_overflow, pp_overflow;

  int checks = 0, failures = 0;

  // clocks: ADC CLKOUT and clk_60 at the same rate, clk_180 at three times
  always #12 adc_clkout = ~adc_clkout;
  initial begin #5; forever #12 clk_60 = ~clk_60; end
  initial begin #1; forever #4 clk_180 = ~clk_180; end

  ddc_receiver_top dut (.*);
  adc_spi_model adc_regs (.ss_n(adc_ss_n), .sclk(adc_sclk), .mosi(adc_mosi), .miso(adc_miso));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- ADC data model ----------------
  real f_in = 10.3e6;
  longint n_adc = 0;
  logic [15:0] cur = '0;
  logic [15:0] raw_q[$];

  function automatic logic [7:0] even_bits(logic [15:0] s);
    for (int k = 0; k < 8; k++) even_bits[k] = s[2*k];
  endfunction
  function automatic logic [7:0] odd_bits(logic [15:0] s);
    for (int k = 0; k < 8; k++) odd_bits[k] = s[2*k+1];
  endfunction

  always @(negedge adc_clkout) begin
    int v;
    v = $rtoi($floor(A * $cos(2.0 * PI * f_in / 60.0e6 * real'(n_adc)) + 0.5))
        + $urandom_range(0, 16) - 8;
    cur = 16'(v);
    n_adc++;
    #6 adc_d = even_bits(cur);
  end
  always @(posedge adc_clkout) begin
    if (!dut.rst_adc) raw_q.push_back(cur);
    #6 adc_d = odd_bits(cur);
  end

  // ---------------- raw sample path ----------------
  int n_raw = 0, n_mux_pp2 = 0, n_pp_wr_sw = 0, n_pp_rd_sw = 0;
  logic wr_sel_d = 0, rd_sel_d = 0;
  always @(posedge clk_60) begin
    if (!dut.rst_60 && adc_sample_valid) begin
      n_raw++;
      if (dut.u_pingpong.rd_sel_q) n_mux_pp2++;
      if (raw_q.size() == 0) check(0, "raw sample with nothing sent");
      else check(adc_sample == raw_q.pop_front(), "raw sample mismatch");
    end
    if (!dut.rst_60 && dut.u_pingpong.rd_sel != rd_sel_d) n_pp_rd_sw++;
    rd_sel_d <= dut.u_pingpong.rd_sel;
  end
  always @(posedge clk_180) begin
    if (!dut.rst_180 && dut.u_pingpong.wr_sel != wr_sel_d) n_pp_wr_sw++;
    wr_sel_d <= dut.u_pingpong.wr_sel;
  end

  // ---------------- I/Q output measurement ----------------
  int n_iq = 0, n_real_only = 0, skip = 0, zc_i = 0, zc_q = 0, n_meas = 0;
  real env_min, env_max;
  logic signed [15:0] last_i = 0, last_q = 0;

  task automatic meas_reset(int nskip);
    skip = nskip; env_min = 1.0e9; env_max = 0.0; zc_i = 0; zc_q = 0; n_meas = 0;
  endtask

  always @(posedge clk_60) begin
    if (!dut.rst_60 && iq_valid) begin
      real env;
      n_iq++;
      if (real_only) begin
        n_real_only++;
        check(q_out == 0, "Q zero in real-only mode");
      end
      if (skip > 0) skip--;
      else begin
        n_meas++;
        env = real_only ? 0.0 : $sqrt(real'(i_out) ** 2 + real'(q_out) ** 2);
        if (env < env_min) env_min = env;
        if (env > env_max) env_max = env;
        if ((i_out < 0) != (last_i < 0)) zc_i++;
        if ((q_out < 0) != (last_q < 0)) zc_q++;
      end
      last_i = i_out;
      last_q = q_out;
    end
  end

  // ---------------- helpers ----------------
  logic [15:0] h_file [L];
  function automatic real h_mag(real f);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < L; n++) begin
      re += real'($signed(h_file[n])) * $cos(2.0 * PI * f / 60.0e6 * n);
      im -= real'($signed(h_file[n])) * $sin(2.0 * PI * f / 60.0e6 * n);
    end
    return $sqrt(re * re + im * im) / 32768.0;
  endfunction

  int n_spi_wr = 0, n_spi_rd = 0, n_coef_wr = 0, n_retune = 0;

  task automatic spi(input logic r, input logic [6:0] a, input logic [7:0] d);
    @(posedge clk_60);
    spi_start <= 1; spi_rw <= r; spi_addr <= a; spi_wdata <= d;
    @(posedge clk_60) spi_start <= 0;
    do @(posedge clk_60); while (!spi_done);
    if (r) n_spi_rd++; else n_spi_wr++;
  endtask

  task automatic wait_iq(int n);
    int target = n_iq + n;
    while (n_iq < target) @(posedge clk_60);
  endtask

  logic [7:0] cfg [4] = '{8'h80, 8'h00, 8'h01, 8'h05};

  initial begin
    real g, e;
    $readmemh("rtl/decim_fir_coef.hex", h_file);
    g = h_mag(300.0e3);
    e = A / 2.0 * g;
    repeat (10) @(posedge clk_60);
    locked <= 1;
    repeat (4) @(posedge clk_60);
    rst <= 0;
    repeat (4) @(posedge clk_60);   // reset synchronisers release

    // program and verify ADC registers 1..4
    for (int r = 0; r < 4; r++) spi(1'b0, 7'(r + 1), cfg[r]);
    for (int r = 0; r < 4; r++) begin
      spi(1'b1, 7'(r + 1), 8'h00);
      check(spi_rdata == cfg[r], $sformatf("ADC reg %0d read %h expected %h", r + 1, spi_rdata, cfg[r]));
    end

    // complex output of the 10.3 MHz tone
    meas_reset(K + 2);
    wait_iq(K + 2 + 60);
    check(env_min > 0.97 * e && env_max < 1.03 * e,
          $sformatf("envelope %f..%f expected %f", env_min, env_max, e));
    check(zc_i >= 34 && zc_i <= 38, $sformatf("I sign changes %0d in 60 outputs (expect 36)", zc_i));
    check(zc_q >= 34 && zc_q <= 38, $sformatf("Q sign changes %0d in 60 outputs (expect 36)", zc_q));

    // real-only mode
    @(posedge clk_60) real_only <= 1;
    meas_reset(1);
    wait_iq(20);
    @(posedge clk_60) real_only <= 0;

    // taps rewritten at half scale
    for (int n = 0; n < L; n++) begin
      @(posedge clk_60);
      coef_we <= 1; coef_addr <= 9'(n);
      coef_data <= $signed(h_file[n]) >>> 1;
      n_coef_wr++;
    end
    @(posedge clk_60) coef_we <= 0;
    meas_reset(K + 2);
    wait_iq(K + 2 + 30);
    check(env_min > 0.97 * e / 2.0 && env_max < 1.03 * e / 2.0,
          $sformatf("half-scale envelope %f..%f expected %f", env_min, env_max, e / 2.0));

    // retune to the input frequency: output moves to DC
    @(posedge clk_60) tuning_word <= 32'd737302719;   // round(2^32 * 10.3/60)
    n_retune++;
    meas_reset(K + 2);
    wait_iq(K + 2 + 30);
    check(zc_i <= 1 && zc_q <= 1, $sformatf("DC output after retune: sign changes %0d/%0d", zc_i, zc_q));
    check(env_min > 0.95 * A / 4.0 && env_max < 1.05 * A / 4.0,
          $sformatf("DC envelope %f..%f expected %f", env_min, env_max, A / 4.0));

    // bookkeeping
    check(n_raw > 100 * D, $sformatf("raw samples delivered %0d", n_raw));
    check(raw_q.size() <= 8, $sformatf("%0d raw samples in flight", raw_q.size()));
    check(n_iq * D <= n_raw && n_iq * D > n_raw - D - 8, $sformatf("iq %0d raw %0d", n_iq, n_raw));
    check(!capture_overflow && !pp_overflow, "no FIFO overflow");
    check(n_pp_wr_sw > 0, "ping-pong write switch happened");
    check(n_pp_rd_sw > 0, "ping-pong read switch happened");
    check(n_mux_pp2 > 0, "MUX delivered from PP2");
    check(n_spi_wr > 0 && n_spi_rd > 0, "SPI write and read happened");
    check(n_real_only > 0, "real-only output happened");
    check(n_coef_wr > 0, "coefficient write happened");
    check(n_retune > 0, "retune happened");
    $display("mechanisms: pp_wr_switch=%0d pp_rd_switch=%0d mux_pp2=%0d spi_wr=%0d spi_rd=%0d real_only=%0d coef_wr=%0d retune=%0d raw=%0d iq=%0d",
             n_pp_wr_sw, n_pp_rd_sw, n_mux_pp2, n_spi_wr, n_spi_rd, n_real_only, n_coef_wr, n_retune, n_raw, n_iq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_60);
    failures++;
    $display("FAIL: watchdog (raw %0d, iq %0d, spi %0d/%0d)", n_raw, n_iq, n_spi_wr, n_spi_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
