// tb_decim_fir: self-checking test of the complex decimating FIR.
//
// Reference: output m = sum_{n=0}^{L-1} h[n] * x[m*D + D-1 - n] (x before
// reset counts as zero), then (sum + 2^14) >> 15 saturated to 16 bits,
// computed here from the full input history with 64-bit integers. Runs
//   1. the default taps (read from the same table file) on random I/Q with
//      gaps in in_valid;
//   2. random taps written through the coefficient port (the programmable
//      cut-off), again checked exactly;
//   3. real-only mode: I as before, Q must be zero.
// Also checks one output per D inputs and the two-cycle latency from the
// strobe of a block's last sample to out_valid.
module tb_decim_fir;
  localparam int D = 60, K = 8, L = D * K;

  logic clk = 0, rst = 1, in_valid = 0, real_only = 0;
  logic signed [15:0] i_in = 0, q_in = 0, i_out, q_out;
  logic coef_we = 0;
  logic [8:0] coef_addr = 0;
  logic signed [15:0] coef_data = 0;
  logic out_valid;

  int checks = 0, failures = 0;
  logic signed [15:0] h [L];
  logic [15:0] h_file [L];
  longint xi_hist[$], xq_hist[$];
  int n_out = 0, m_idx = 0, last_strobe_cyc = 0, cyc = 0;

  always #8 clk = ~clk;
  always @(posedge clk) cyc++;

  decim_fir #(.DECIM(D), .NMAC(K)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint sc(longint a);
    longint r;
    r = a + 16384;
    r = (r >= 0) ? r / 32768 : -((-r + 32767) / 32768);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic longint ref_out(int m, bit q);
    longint acc = 0;
    for (int n = 0; n < L; n++) begin
      int t = m * D + D - 1 - n;
      if (t >= 0) acc += longint'(h[n]) * (q ? xq_hist[t] : xi_hist[t]);
    end
    return sc(acc);
  endfunction

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      xi_hist.push_back(longint'(i_in));
      xq_hist.push_back(longint'(q_in));
      if (xi_hist.size() % D == 0) last_strobe_cyc = cyc;
    end
    if (out_valid && !rst) begin
      n_out++;
      check(cyc - last_strobe_cyc == 2, $sformatf("latency %0d", cyc - last_strobe_cyc));
      check(longint'(i_out) == ref_out(m_idx, 0), $sformatf("I[%0d] %0d exp %0d", m_idx, i_out, ref_out(m_idx, 0)));
      if (real_only) check(q_out == 0, "Q zero in real-only mode");
      else check(longint'(q_out) == ref_out(m_idx, 1), $sformatf("Q[%0d] %0d exp %0d", m_idx, q_out, ref_out(m_idx, 1)));
      m_idx++;
    end
  end

  task automatic run(int nblocks, int amp);
    int sent = 0;
    while (sent < nblocks * D) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 4) != 0);
      if ($urandom_range(0, 4) != 0) begin
        i_in <= 16'($signed($urandom_range(0, 2*amp)) - amp);
        q_in <= 16'($signed($urandom_range(0, 2*amp)) - amp);
      end
      if (in_valid) sent++;
    end
    @(posedge clk) in_valid <= 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic restart();
    @(posedge clk) rst <= 1;
    @(posedge clk) rst <= 0;
    xi_hist.delete(); xq_hist.delete();
    m_idx = 0; n_out = 0;
  endtask

  initial begin
    $readmemh("rtl/decim_fir_coef.hex", h_file);
    for (int n = 0; n < L; n++) h[n] = $signed(h_file[n]);
    repeat (3) @(posedge clk);
    rst <= 0;
    // 1. default taps
    run(12, 32767);
    check(n_out == 12, $sformatf("outputs %0d for 12 blocks", n_out));
    // 2. programmed taps
    restart();
    rst <= 1;
    for (int n = 0; n < L; n++) begin
      @(posedge clk);
      h[n] = 16'($signed($urandom_range(0, 2000)) - 1000);
      coef_we <= 1; coef_addr <= 9'(n); coef_data <= h[n];
    end
    @(posedge clk) coef_we <= 0;
    @(posedge clk) rst <= 0;
    run(10, 32767);
    check(n_out == 10, $sformatf("outputs %0d for 10 blocks", n_out));
    // 3. real-only
    restart();
    real_only <= 1;
    run(6, 20000);
    check(n_out == 6, "outputs in real-only mode");
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
