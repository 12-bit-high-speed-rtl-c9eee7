// pipe_reg: W-bit D register with asynchronous active-high reset to zero.
// It is the "4-bit Reg" used for the input skew, accumulator and output
// deskew registers of the phase accumulator and, with W = 1, the DFF that
// holds a stage's carry until the next clock.
// Interface: clk, reset, d[W-1:0] in; q[W-1:0] out, updated on the rising
// edge of clk, cleared at once while reset is high.
// The published schematic gives every register a Reset and clk pin; that the
// reset is asynchronous and active-high is a choice of this design.
module pipe_reg #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or posedge reset) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
