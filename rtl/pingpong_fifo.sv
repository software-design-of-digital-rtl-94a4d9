// pingpong_fifo: two 16-bit FIFOs used alternately (ping-pong) with an
// output multiplexer, carrying ADC samples from the 180 MHz domain to the
// 60 MHz processing clock.
//
// The receiver description stores the re-assembled samples "in two 16 bit
// FIFOs" that "operate in ping pong operation", reads the final data at
// 60 MHz, and draws a MUX between the two FIFOs driving Final(15:0). How the
// ping-pong alternates is this design's choice: the writer fills FIFO PP1
// with BLOCK_LEN samples, then PP2 with the next BLOCK_LEN, and so on; the
// reader drains BLOCK_LEN samples from PP1, then BLOCK_LEN from PP2, so the
// sample order is kept. The MUX select is the reader's current FIFO.
//
// Interface and timing:
//   wr_clk domain: wr_en/wr_data store one sample; a sample offered to a
//     full FIFO is dropped and pulses overflow.
//   rd_clk domain: whenever the FIFO being read is non-empty one sample is
//     popped; final_data/final_valid appear one rd_clk cycle later.
//   wr_sel / rd_sel: 0 = PP1, 1 = PP2.
module pingpong_fifo #(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned DEPTH_LOG2 = 4,
  parameter int unsigned BLOCK_LEN  = 8
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,

  input  logic             rd_clk,
  input  logic             rd_rst,
  output logic [WIDTH-1:0] final_data,
  output logic             final_valid,

  output logic             wr_sel,
  output logic             rd_sel,
  output logic             overflow
);

  localparam int unsigned CNT_W = $clog2(BLOCK_LEN + 1);

  logic [WIDTH-1:0] pp_data  [2];
  logic [1:0]       pp_empty, pp_full, pp_valid, pp_ovf, pp_wr, pp_rd;
  logic [CNT_W-1:0] wr_cnt, rd_cnt;
  logic             rd_sel_q;   // select of the word now on rd_data (MUX)

  // ---- write side: BLOCK_LEN samples into one FIFO, then switch ----
  assign pp_wr = wr_en ? (wr_sel ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_sel <= 1'b0;
      wr_cnt <= '0;
    end else if (wr_en) begin
      if (wr_cnt == CNT_W'(BLOCK_LEN - 1)) begin
        wr_cnt <= '0;
        wr_sel <= ~wr_sel;
      end else begin
        wr_cnt <= wr_cnt + CNT_W'(1);
      end
    end
  end

  // ---- read side: BLOCK_LEN samples from one FIFO, then switch ----
  logic rd_go;
  assign rd_go = !pp_empty[rd_sel];
  assign pp_rd = rd_go ? (rd_sel ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_sel   <= 1'b0;
      rd_cnt   <= '0;
      rd_sel_q <= 1'b0;
    end else begin
      rd_sel_q <= rd_sel;
      if (rd_go) begin
        if (rd_cnt == CNT_W'(BLOCK_LEN - 1)) begin
          rd_cnt <= '0;
          rd_sel <= ~rd_sel;
        end else begin
          rd_cnt <= rd_cnt + CNT_W'(1);
        end
      end
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_pp
    async_fifo #(.WIDTH(WIDTH), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
      .wr_clk (wr_clk), .wr_rst (wr_rst), .wr_en (pp_wr[g]), .wr_data (wr_data),
      .full   (pp_full[g]), .overflow (pp_ovf[g]),
      .rd_clk (rd_clk), .rd_rst (rd_rst), .rd_en (pp_rd[g]),
      .rd_data(pp_data[g]), .rd_valid (pp_valid[g]), .empty (pp_empty[g])
    );
  end

  // Output MUX.
  assign final_data  = pp_data[rd_sel_q];
  assign final_valid = pp_valid[rd_sel_q];
  assign overflow    = |pp_ovf;

  a_one_reader: assert property (@(posedge rd_clk) disable iff (rd_rst)
                                 !(pp_valid[0] && pp_valid[1]));

endmodule
