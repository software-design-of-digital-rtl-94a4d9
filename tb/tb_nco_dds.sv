// tb_nco_dds: self-checking test of the local oscillator.
//
// The reference phase of sample n is n * tuning_word mod 2^32, computed here
// independently. The oscillator keeps the top 10 bits p of that phase, so its
// output must be round(32767 * sin(2*pi*(p + 0.5)/1024)) and the same with
// cos, within one LSB. Checked for the 10 MHz tuning word (60 MSPS), with
// gaps in en, and for a second random frequency after a reset. Also checks
// the two-cycle latency, the quadrature (cos leads sin by 90 degrees: sin^2
// + cos^2 near full scale) and the frequency: 600 samples at 10 MHz / 60 MSPS
// hold exactly 100 periods, 200 sign changes of the sine.
module tb_nco_dds;
  logic clk = 0, rst = 1, en = 0;
  logic [31:0] tw = 32'd715827883;
  logic signed [15:0] sine, cosine;
  logic out_valid;

  int checks = 0, failures = 0;
  longint unsigned ref_phase = 0;
  longint unsigned ph_q[$];
  int sign_changes = 0;
  logic signed [15:0] last_sine = 0;
  bit count_zc = 0;
  int en_cycle[$];
  int cyc = 0;

  always #8 clk = ~clk;
  always @(posedge clk) cyc++;

  nco_dds #(.PHASE_W(32), .LUT_AW(8), .OUT_W(16)) dut (
    .clk, .rst, .en, .tuning_word(tw), .sine, .cosine, .out_valid);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  always @(posedge clk) begin
    if (!rst && en) begin
      ph_q.push_back(ref_phase);
      en_cycle.push_back(cyc);
      ref_phase = (ref_phase + tw) & 64'hFFFF_FFFF;
    end
    if (out_valid) begin
      longint unsigned ph;
      real ang;
      int es, ec, c0;
      ph  = ph_q.pop_front();
      c0  = en_cycle.pop_front();
      ang = 2.0 * 3.141592653589793 * (real'(ph >> 22) + 0.5) / 1024.0;
      es  = int'($floor(32767.0 * $sin(ang) + 0.5));
      ec  = int'($floor(32767.0 * $cos(ang) + 0.5));
      check(absd(int'(sine), es) <= 1, $sformatf("sine %0d exp %0d", sine, es));
      check(absd(int'(cosine), ec) <= 1, $sformatf("cosine %0d exp %0d", cosine, ec));
      check(cyc - c0 == 2, $sformatf("latency %0d", cyc - c0));
      check(absd(int'(sine)*int'(sine) + int'(cosine)*int'(cosine), 32767*32767) < 32767*32767/50,
            "quadrature amplitude");
      if (count_zc && ((sine < 0) != (last_sine < 0))) sign_changes++;
      last_sine = sine;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // contiguous samples: frequency check
    en <= 1;
    repeat (3) @(posedge clk);
    count_zc = 1;
    repeat (600) @(posedge clk);
    count_zc = 0;
    // gaps in en
    repeat (300) begin @(posedge clk); en <= ($urandom_range(0, 2) != 0); end
    en <= 0;
    repeat (4) @(posedge clk);
    check(ph_q.size() == 0, "every en produced one output");
    check(sign_changes >= 199 && sign_changes <= 201,
          $sformatf("sign changes %0d (expect 200)", sign_changes));
    // second frequency after reset
    rst <= 1; ref_phase = 0;
    tw  <= 32'($urandom) >> 1;        // DC to fs/2
    @(posedge clk); @(posedge clk);
    rst <= 0;
    @(posedge clk);
    en <= 1;
    repeat (500) @(posedge clk);
    en <= 0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
