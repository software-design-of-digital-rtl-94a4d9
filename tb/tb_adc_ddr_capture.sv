// tb_adc_ddr_capture: self-checking test of the DDR lane de-multiplexer.
//
// A model of the ADC's double-data-rate output drives random 16-bit samples
// on eight lanes: bits D0, D2 .. D14 while CLKOUT+ is low and D1, D3 .. D15
// while it is high, changing a quarter period after each clock edge. Every
// sample whose low phase ends after reset is expected back, whole and in
// order, in the 180 MHz domain. Also checks that no overflow occurs and that
// the output rate equals the input rate (at most a few samples in flight).
module tb_adc_ddr_capture;
  localparam int HALF_ADC = 8;   // 60 MHz-like CLKOUT
  localparam int HALF_180 = 3;   // 3x faster read clock (not phase locked)

  logic adc_clkout = 0, clk_180 = 0, adc_rst = 1, rst_180 = 1;
  logic [7:0] adc_d = '0;
  logic [15:0] sample;
  logic sample_valid, overflow;

  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_ovf = 0;
  logic [15:0] ref_q[$];
  logic [15:0] cur = '0;

  always #HALF_ADC adc_clkout = ~adc_clkout;
  initial begin #1; forever #HALF_180 clk_180 = ~clk_180; end

  adc_ddr_capture #(.FIFO_DEPTH_LOG2(4)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] even_bits(logic [15:0] s);
    for (int k = 0; k < 8; k++) even_bits[k] = s[2*k];
  endfunction
  function automatic logic [7:0] odd_bits(logic [15:0] s);
    for (int k = 0; k < 8; k++) odd_bits[k] = s[2*k+1];
  endfunction

  // ADC output model: a new sample starts at each falling edge.
  always @(negedge adc_clkout) begin
    cur = 16'($urandom);
    #(HALF_ADC/2) adc_d = even_bits(cur);
  end
  always @(posedge adc_clkout) begin
    if (!adc_rst) begin ref_q.push_back(cur); n_in++; end
    #(HALF_ADC/2) adc_d = odd_bits(cur);
  end

  always @(posedge clk_180) begin
    if (sample_valid) begin
      n_out++;
      if (ref_q.size() == 0) check(0, "unexpected sample");
      else check(sample == ref_q.pop_front(), "sample mismatch");
    end
  end
  always @(posedge adc_clkout) if (overflow) n_ovf++;
  always @(negedge adc_clkout) if (overflow) n_ovf++;

  initial begin
    repeat (4) @(posedge adc_clkout);
    @(posedge clk_180) rst_180 <= 0;
    @(posedge adc_clkout) adc_rst <= 0;
    repeat (500) @(posedge adc_clkout);
    // Samples in flight: at most a few (two-flop pointer synchronisers).
    @(posedge clk_180);
    check(ref_q.size() <= 4, $sformatf("%0d samples in flight", ref_q.size()));
    check(n_in - n_out <= 4 && n_out <= n_in, $sformatf("rate: in %0d out %0d", n_in, n_out));
    check(n_in > 450, "enough samples streamed");
    check(n_ovf == 0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge adc_clkout);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
