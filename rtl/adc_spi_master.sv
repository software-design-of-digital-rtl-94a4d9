// adc_spi_master: programs the ADC's mode-control registers over its serial
// port (SS, SCLK, MOSI, MISO).
//
// Following the ADC serial-port description: a transfer starts when SS is
// taken low and ends when SS is taken high again; the word is 16 bits, sent
// first bit first: R/W, then the register address A6:A0, then the register
// data D7:D0. The ADC latches MOSI on the first 16 rising edges of SCLK. With
// R/W high the ADC leaves the register unchanged and shifts its contents out
// on MISO during the data bits; this block captures them into rdata.
//
// This design's choices (the document does not give them): SCLK = clk /
// CLK_DIV and idles low; MOSI changes while SCLK is low, half a SCLK period
// before the rising edge that latches it; MISO is sampled at each SCLK rising
// edge; SS is low for half a SCLK period before the first edge and after the
// last one.
//
// Interface and timing: pulse start for one clk cycle while busy is low, with
// rw/addr/wdata valid in that cycle. busy stays high for 17 SCLK periods;
// done pulses for one cycle at the end, with rdata valid from then on.
module adc_spi_master
  import ddc_pkg::*;
#(
  parameter int unsigned CLK_DIV = 8   // even, >= 2
) (
  input  logic       clk,
  input  logic       rst,

  input  logic       start,
  input  logic       rw,
  input  logic [6:0] addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,

  output logic       ss_n,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);

  localparam int unsigned HALF = CLK_DIV / 2;
  localparam int unsigned DIV_W = (HALF > 1) ? $clog2(HALF) : 1;

  typedef enum logic [1:0] {S_IDLE, S_LEAD, S_SHIFT, S_TRAIL} state_t;
  state_t state;

  logic [DIV_W-1:0] div_cnt;
  logic [3:0]       bit_cnt;
  logic [15:0]      tx_sr;
  logic [7:0]       rx_sr;   // last 8 MISO bits
  logic             tick;
  spi_word_t        word_in;

  assign word_in = '{rw: rw, addr: addr, data: wdata};
  assign tick    = (div_cnt == DIV_W'(HALF - 1));
  assign busy    = (state != S_IDLE);
  assign mosi    = tx_sr[15];
  assign rdata   = rx_sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      div_cnt <= '0;
      bit_cnt <= '0;
      tx_sr   <= '0;
      rx_sr   <= '0;
      ss_n    <= 1'b1;
      sclk    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      div_cnt <= tick ? '0 : div_cnt + DIV_W'(1);
      unique case (state)
        S_IDLE: begin
          div_cnt <= '0;
          if (start) begin
            tx_sr   <= word_in;
            bit_cnt <= '0;
            ss_n    <= 1'b0;
            state   <= S_LEAD;
          end
        end
        S_LEAD: if (tick) begin
          sclk  <= 1'b1;                 // rising edge: bit 0 latched
          rx_sr <= {rx_sr[6:0], miso};
          state <= S_SHIFT;
        end
        S_SHIFT: if (tick) begin
          if (sclk) begin
            sclk <= 1'b0;                // falling edge
            if (bit_cnt == 4'd15) begin
              state <= S_TRAIL;
            end else begin
              tx_sr   <= {tx_sr[14:0], 1'b0};
              bit_cnt <= bit_cnt + 4'd1;
            end
          end else begin
            sclk  <= 1'b1;               // rising edge: next bit latched
            rx_sr <= {rx_sr[6:0], miso};
          end
        end
        S_TRAIL: if (tick) begin
          ss_n  <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_sclk_only_when_selected: assert property (@(posedge clk) disable iff (rst)
                                              sclk |-> !ss_n);

endmodule
