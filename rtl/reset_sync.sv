// reset_sync: reset synchroniser for one clock domain.
//
// Asserts rst_out as soon as rst_in is seen at a clock edge and releases it
// STAGES clock edges after rst_in goes low, so every domain of the receiver
// leaves reset cleanly on its own clock. rst_in may come from any domain.
// The published receiver does not describe its reset; this scheme is this
// design's choice. Timing: rst_out rises one edge after rst_in is seen and
// falls STAGES edges after rst_in has gone low.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst_in) sr <= '1;
    else        sr <= {sr[STAGES-2:0], 1'b0};
  end

  assign rst_out = sr[STAGES-1];

endmodule
