// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Writes a pseudo-random stream on a 60 MHz-like clock and reads it on a
// 180 MHz-like clock (then the reverse ratio by stalling the reader), and
// compares every word read with a reference queue. Also fills the FIFO with
// the reader stopped and checks full, the overflow pulse on a dropped write,
// that exactly DEPTH words come back, and empty afterwards.
module tb_async_fifo;
  localparam int W = 8, DL = 4, DEPTH = 1 << DL;

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, overflow, rd_valid, empty;

  int checks = 0, failures = 0;
  logic [W-1:0] ref_q[$];
  int ovf_seen = 0;
  bit stall_reader = 0;

  always #9 wclk = ~wclk;
  always #4 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH_LOG2(DL)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data, .full, .overflow,
    .rd_clk(rclk), .rd_rst(rrst), .rd_en, .rd_data, .rd_valid, .empty);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reader: pop whenever not empty (unless stalled), compare
  always @(posedge rclk) begin
    if (!rrst) begin
      if (rd_valid) begin
        logic [W-1:0] exp;
        if (ref_q.size() == 0) check(0, "read with empty reference");
        else begin
          exp = ref_q.pop_front();
          check(rd_data == exp, $sformatf("data %h exp %h", rd_data, exp));
        end
      end
      rd_en <= !stall_reader && ($urandom_range(0, 3) != 0);
    end
  end
  always @(posedge wclk) if (overflow) ovf_seen++;

  initial begin
    repeat (5) @(posedge wclk);
    @(posedge wclk) wrst <= 0;
    @(posedge rclk) rrst <= 0;
    check(empty == 1, "empty after reset");
    check(full == 0, "not full after reset");
    // streaming phase
    repeat (400) begin
      @(posedge wclk);
      if (!full && $urandom_range(0, 1)) begin
        wr_en <= 1; wr_data <= W'($urandom);
      end else wr_en <= 0;
    end
    @(posedge wclk) wr_en <= 0;
    repeat (40) @(posedge rclk);
    check(ref_q.size() == 0, "all streamed words read");
    check(empty == 1, "empty after stream");
    // fill with reader stalled
    stall_reader = 1;
    repeat (10) @(posedge rclk);
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(posedge wclk);
      wr_en <= 1; wr_data <= W'(8'hA0 + i);
    end
    @(posedge wclk) wr_en <= 0;
    repeat (3) @(posedge wclk);
    check(full == 1, "full after DEPTH+3 writes");
    check(ovf_seen >= 3, $sformatf("overflow pulses %0d", ovf_seen));
    stall_reader = 0;
    repeat (200) @(posedge rclk);
    check(ref_q.size() == 0, "FIFO returned DEPTH words");
    check(empty == 1, "empty after drain");
    check(full == 0, "not full after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: record writes that the FIFO accepts
  always @(posedge wclk) if (!wrst && wr_en && !full) ref_q.push_back(wr_data);

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
