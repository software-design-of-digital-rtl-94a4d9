// async_fifo: dual-clock FIFO.
//
// Used for all four buffers of the ADC capture path: the two 8-bit lane
// FIFOs (written on the ADC's CLKOUT, read at 180 MHz) and the two 16-bit
// ping-pong FIFOs (written at 180 MHz, read at 60 MHz). The document gives
// only the pins wr_clk, wr_en, rd_clk, rd_en and the data buses; the
// structure here is a standard one chosen for this design: binary pointers
// one bit wider than the address, converted to Gray code and passed to the
// other clock domain through two flip-flops, so full and empty are
// conservative (they may stay asserted a few cycles longer than needed, never
// shorter).
//
// Interface and timing:
//   write side: a word on wr_data is stored at the wr_clk edge where wr_en
//     is high and full is low. A write while full is dropped and flagged by a
//     one-cycle pulse on overflow.
//   read side: rd_en while not empty pops a word; it appears on rd_data at
//     the next rd_clk edge together with rd_valid (registered read). rd_en
//     while empty is ignored.
//   wr_rst and rd_rst are synchronous to their own clocks and must be
//   asserted together.
module async_fifo #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,

  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty
);

  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wr_bin, wr_gray, rd_bin, rd_gray;
  ptr_t rd_gray_w1, rd_gray_w2;   // read pointer seen in the write domain
  ptr_t wr_gray_r1, wr_gray_r2;   // write pointer seen in the read domain

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic wr_do;
  ptr_t wr_bin_next;
  assign wr_bin_next = wr_bin + ptr_t'(1);
  // Full when the write pointer is one lap ahead: the two top Gray bits
  // differ and the rest are equal.
  assign full  = (wr_gray == {~rd_gray_w2[DEPTH_LOG2:DEPTH_LOG2-1],
                              rd_gray_w2[DEPTH_LOG2-2:0]});
  assign wr_do = wr_en && !full;

  always_ff @(posedge wr_clk) begin
    if (wr_do) mem[wr_bin[DEPTH_LOG2-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
      overflow   <= 1'b0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      overflow   <= wr_en && full;
      if (wr_do) begin
        wr_bin  <= wr_bin_next;
        wr_gray <= bin2gray(wr_bin_next);
      end
    end
  end

  // ---------------- read domain ----------------
  logic rd_do;
  ptr_t rd_bin_next;
  assign rd_bin_next = rd_bin + ptr_t'(1);
  assign empty = (rd_gray == wr_gray_r2);
  assign rd_do = rd_en && !empty;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
      rd_valid   <= 1'b0;
      rd_data    <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      rd_valid   <= rd_do;
      if (rd_do) begin
        rd_data <= mem[rd_bin[DEPTH_LOG2-1:0]];
        rd_bin  <= rd_bin_next;
        rd_gray <= bin2gray(rd_bin_next);
      end
    end
  end

endmodule
