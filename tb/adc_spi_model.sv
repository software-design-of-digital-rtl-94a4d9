// adc_spi_model: behavioural model of the ADC's serial programming port, for
// testbenches only (not synthesizable).
//
// 128 eight-bit mode-control registers. A transfer starts when ss_n falls;
// MOSI is latched at the first 16 rising edges of sclk, later edges are
// ignored. The first bit is R/W, then A6:A0, then D7:D0. For a write the
// register is updated when ss_n rises, provided 16 bits arrived. For a read
// the register is not changed and its contents are shifted out on miso, D7
// first, changing after each falling edge from the 8th one so that each bit
// is stable at the rising edge that follows. Registers start at zero.
module adc_spi_model (
  input  logic ss_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);
  logic [7:0]  regs [128];
  logic [15:0] sr;
  int          nbits;
  int          n_falls;
  logic [15:0] last_word;
  int          n_writes = 0, n_reads = 0;
  logic        rd_cmd;
  logic [6:0]  rd_addr;

  initial begin
    for (int i = 0; i < 128; i++) regs[i] = '0;
    miso = 1'b0;
    nbits = 0;
    n_falls = 0;
    rd_cmd = 1'b0;
    rd_addr = '0;
    sr = '0;
    last_word = '0;
  end

  always @(negedge ss_n) begin
    nbits = 0;
    n_falls = 0;
    miso = 1'b0;
  end

  always @(posedge sclk) begin
    if (!ss_n && nbits < 16) begin
      sr = {sr[14:0], mosi};
      nbits++;
      if (nbits == 8) begin rd_cmd = sr[7]; rd_addr = sr[6:0]; end
    end
  end

  always @(negedge sclk) begin
    if (!ss_n) begin
      n_falls++;
      if (rd_cmd && nbits >= 8 && nbits < 16)
        miso = regs[rd_addr][15 - nbits];
    end
  end

  always @(posedge ss_n) begin
    if (nbits == 16) begin
      last_word = sr;
      if (!sr[15]) begin regs[sr[14:8]] = sr[7:0]; n_writes++; end
      else n_reads++;
    end
    miso = 1'b0;
  end
endmodule
