// tb_pingpong_fifo: self-checking test of the ping-pong FIFO pair.
//
// Phase 1 writes a counting-plus-random sample stream at one sample per three
// cycles of the fast (180 MHz-like) clock, the ADC's rate, and reads at the
// slow (60 MHz-like) clock; every sample must come out once and in order,
// the write and read selects must each toggle once per BLOCK_LEN samples,
// and the output must alternate between the two FIFOs in blocks. Phase 2
// writes every fast cycle (three times the read rate): the FIFOs must fill
// and flag overflow.
module tb_pingpong_fifo;
  localparam int BL = 8;

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0;
  logic [15:0] wr_data = '0, final_data;
  logic final_valid, wr_sel, rd_sel, overflow;

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, wr_toggles = 0, rd_toggles = 0, n_ovf = 0;
  logic [15:0] ref_q[$];
  logic wr_sel_d = 0, rd_sel_d = 0;
  bit phase2 = 0;

  always #3 wclk = ~wclk;
  initial begin #2; forever #9 rclk = ~rclk; end

  pingpong_fifo #(.WIDTH(16), .DEPTH_LOG2(4), .BLOCK_LEN(BL)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data,
    .rd_clk(rclk), .rd_rst(rrst), .final_data, .final_valid,
    .wr_sel, .rd_sel, .overflow);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge wclk) begin
    if (!wrst && wr_en && !phase2) begin ref_q.push_back(wr_data); n_wr++; end
    if (overflow) n_ovf++;
    if (!wrst && wr_sel != wr_sel_d) wr_toggles++;
    wr_sel_d <= wr_sel;
  end

  always @(posedge rclk) begin
    if (!rrst && rd_sel != rd_sel_d) rd_toggles++;
    rd_sel_d <= rd_sel;
    if (final_valid && !phase2) begin
      n_rd++;
      if (ref_q.size() == 0) check(0, "unexpected output");
      else check(final_data == ref_q.pop_front(), "data/order mismatch");
    end
  end

  initial begin
    repeat (4) @(posedge rclk);
    @(posedge wclk) wrst <= 0;
    @(posedge rclk) rrst <= 0;
    for (int i = 0; i < 3 * 20 * BL; i++) begin
      @(posedge wclk);
      wr_en   <= (i % 3 == 0);
      wr_data <= 16'(i / 3) ^ {8'($urandom), 8'h00};
    end
    @(posedge wclk) wr_en <= 0;
    repeat (40) @(posedge rclk);
    check(ref_q.size() == 0, "all samples delivered");
    check(n_rd == n_wr && n_wr == 20 * BL, $sformatf("wr %0d rd %0d", n_wr, n_rd));
    check(wr_toggles == 20, $sformatf("write select toggled %0d times", wr_toggles));
    check(rd_toggles == 20, $sformatf("read select toggled %0d times", rd_toggles));
    // phase 2: overrun
    phase2 = 1;
    @(posedge wclk) begin wr_en <= 1; wr_data <= 16'hBEEF; end
    repeat (200) @(posedge wclk);
    @(posedge wclk) wr_en <= 0;
    check(n_ovf > 0, "overflow flagged when written faster than read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
