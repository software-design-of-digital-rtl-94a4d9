// tb_complex_mixer: self-checking test of the two-multiplier mixer.
//
// Random 16-bit samples and oscillator values, plus the corner values, are
// applied with random gaps in in_valid. The reference is worked out with
// 64-bit integers: I = floor((x*cos + 2^14) / 2^15), Q likewise with sin,
// saturated to 16 bits; the outputs must match exactly one cycle after each
// in_valid and hold their value while in_valid is low.
module tb_complex_mixer;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] x = 0, s = 0, c = 0, i_out, q_out;
  logic out_valid;
  int checks = 0, failures = 0;
  longint exp_i, exp_q;
  bit pending = 0;

  always #8 clk = ~clk;

  complex_mixer #(.IN_W(16), .OUT_W(16)) dut (
    .clk, .rst, .in_valid, .x, .sine(s), .cosine(c), .i_out, .q_out, .out_valid);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint ref_scale(longint p);
    longint r;
    r = p + 16384;
    r = (r >= 0) ? r / 32768 : -((-r + 32767) / 32768);   // floor division
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      check(out_valid == pending, "out_valid one cycle after in_valid");
      if (out_valid) begin
        check(longint'(i_out) == exp_i, $sformatf("I %0d exp %0d", i_out, exp_i));
        check(longint'(q_out) == exp_q, $sformatf("Q %0d exp %0d", q_out, exp_q));
      end else if (checks > 2) begin
        check(longint'(i_out) == exp_i, "I held while idle");
      end
      pending <= in_valid;
      if (in_valid) begin
        exp_i <= ref_scale(longint'(x) * longint'(c));
        exp_q <= ref_scale(longint'(x) * longint'(s));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // corners
    in_valid <= 1; x <= -16'sd32768; c <= -16'sd32768; s <= 16'sd32767;
    @(posedge clk);
    x <= 16'sd32767; c <= 16'sd32767; s <= -16'sd32767;
    @(posedge clk);
    x <= -16'sd1; c <= 16'sd1; s <= 16'sd16384;
    repeat (2000) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      x <= 16'($urandom); s <= 16'($urandom); c <= 16'($urandom);
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
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
