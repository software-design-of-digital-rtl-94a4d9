// tb_adc_spi_master: self-checking test of the ADC register-programming port.
//
// The master talks to a behavioural model of the ADC's serial port. The test
// writes random values to random registers, reads each back and compares;
// checks the 16-bit word the model latched (R/W, A6:A0, D7:D0), that a read
// does not change the register, that exactly 16 SCLK rising edges occur with
// SS low in every transfer, and the transfer length in clock cycles:
// 33 * CLK_DIV/2 cycles of busy (half a SCLK period of set-up before the
// first edge, 16 SCLK periods, half a period of hold after the last one)
// plus one cycle from the start pulse to done.
module tb_adc_spi_master;
  localparam int CLK_DIV = 8;

  logic clk = 0, rst = 1;
  logic start = 0, rw = 0;
  logic [6:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic busy, done, ss_n, sclk, mosi, miso;

  int checks = 0, failures = 0;
  int edges = 0;
  logic [7:0] shadow [128];

  always #8 clk = ~clk;

  adc_spi_master #(.CLK_DIV(CLK_DIV)) dut (.*);
  adc_spi_model  adc (.ss_n, .sclk, .mosi, .miso);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge sclk) if (!ss_n) edges++;
  always @(posedge sclk) if (ss_n) check(0, "SCLK edge with SS high");

  task automatic xfer(input logic r, input logic [6:0] a, input logic [7:0] d);
    int cyc;
    edges = 0;
    @(posedge clk);
    start <= 1; rw <= r; addr <= a; wdata <= d;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    check(cyc == 33 * CLK_DIV / 2 + 1, $sformatf("transfer took %0d cycles", cyc));
    check(edges == 16, $sformatf("%0d SCLK edges", edges));
    check(adc.last_word == {r, a, d}, $sformatf("word %h latched, sent %h", adc.last_word, {r, a, d}));
    check(ss_n == 1'b1, "SS high at done");
  endtask

  initial begin
    for (int i = 0; i < 128; i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 12; n++) begin
      logic [6:0] a;
      logic [7:0] d;
      a = 7'($urandom);
      d = 8'($urandom);
      xfer(1'b0, a, d);
      shadow[a] = d;
      check(adc.regs[a] == d, "register written");
      xfer(1'b1, a, 8'h5A);
      check(rdata == d, $sformatf("read back %h expected %h", rdata, d));
      check(adc.regs[a] == d, "read leaves register unchanged");
    end
    // read a register never written
    xfer(1'b1, 7'h7F, 8'h00);
    check(rdata == shadow[7'h7F], "read of untouched register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
