// phase_acc: pipelined phase accumulator, STAGES slices of STAGE_W bits
// (3 x 4 = 12 bits by default).
//
// How it works. The N-bit accumulation P <= P + FCW is cut into slices. Slice
// i has its own STAGE_W-bit carry-lookahead adder and accumulator register.
// The carry out of slice i is caught in a one-bit register and added into
// slice i+1 one clock later, so the longest path is one 4-bit CLA, not a
// 12-bit carry chain. Because carries arrive one clock late per slice, the
// inputs are skewed to match: FCW slice i passes through i+1 registers
// before reaching its adder (1, 2 and 3 registers for bits [3:0], [7:4] and
// [11:8]). The accumulator slices then hold values one clock apart, and the
// outputs are deskewed: slice i passes through STAGES-1-i more registers so
// all brought-out slices show the same accumulation step.
//
// Interface. fcw is the frequency control word, c_in the carry into slice 0
// (tie to 0 for a plain accumulator). q is the accumulator without its
// least significant slice (OUT[11:4], 8 bits by default), the phase word
// for the look-up table. c_out is the carry out of the top slice's adder:
// it is combinational and is high in the clock before q wraps through zero.
//
// Timing. With P(t+1) = P(t) + fcw(t) a plain accumulator cleared by reset,
// q(t) = P(t-STAGES)[N-1:STAGE_W]: the pipeline adds STAGES clocks of latency
// and one result comes out every clock. c_in at edge t is added at the same
// step as fcw from edge t-1.
//
// Registers: input skew STAGE_W*STAGES*(STAGES+1)/2, accumulators
// STAGE_W*STAGES, deskew STAGE_W*(STAGES-1)*(STAGES-2)/2, carry STAGES-1;
// 24 + 12 + 4 + 2 = 42 for 3 x 4 and 62 for 3 x 6.
//
// The slice structure, skew and deskew registers, carry flip-flops and the
// OUT[11:4], c_in, c_out ports follow the published design; the reset style
// (asynchronous, active high) and the generalisation to any STAGES are
// choices of this design.
module phase_acc #(
  parameter int unsigned STAGE_W = ddfs_pkg::STAGE_W,
  parameter int unsigned STAGES  = ddfs_pkg::STAGES
) (
  input  logic                            clk,
  input  logic                            reset,
  input  logic [STAGE_W*STAGES-1:0]       fcw,
  input  logic                            c_in,
  output logic [STAGE_W*(STAGES-1)-1:0]   q,
  output logic                            c_out
);
  if (STAGES < 2) begin : g_bad
    $error("phase_acc needs at least two stages");
  end

  // skew[i][0] is FCW slice i, skew[i][j] is that slice after j registers.
  logic [STAGE_W-1:0] skew  [STAGES][STAGES+1];
  logic [STAGE_W-1:0] acc   [STAGES];   // accumulator registers
  logic [STAGE_W-1:0] sum   [STAGES];   // adder outputs
  logic               cout  [STAGES];   // adder carry outputs
  logic               cin   [STAGES];   // carry into each adder
  logic               cdff  [STAGES];   // registered carries (top one unused)
  logic [STAGE_W-1:0] deskew[STAGES][STAGES];

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    assign skew[i][0] = fcw[i*STAGE_W +: STAGE_W];

    for (genvar j = 0; j <= i; j++) begin : g_skew
      pipe_reg #(.W(STAGE_W)) u_skew (
        .clk, .reset, .d(skew[i][j]), .q(skew[i][j+1])
      );
    end

    if (i == 0) begin : g_cin0
      assign cin[i] = c_in;
    end else begin : g_cinr
      assign cin[i] = cdff[i-1];
    end

    cla_adder #(.W(STAGE_W)) u_cla (
      .a(skew[i][i+1]), .b(acc[i]), .c_in(cin[i]), .sum(sum[i]), .c_out(cout[i])
    );

    pipe_reg #(.W(STAGE_W)) u_acc (
      .clk, .reset, .d(sum[i]), .q(acc[i])
    );

    if (i < STAGES - 1) begin : g_cdff
      pipe_reg #(.W(1)) u_cdff (
        .clk, .reset, .d(cout[i]), .q(cdff[i])
      );
    end else begin : g_ctop
      assign cdff[i] = 1'b0;
    end

    // Slices 1..STAGES-1 are brought out; slice i is delayed by
    // STAGES-1-i registers so that all of them line up with the top slice.
    if (i > 0) begin : g_out
      assign deskew[i][0] = acc[i];
      for (genvar k = 0; k < STAGES - 1 - i; k++) begin : g_deskew
        pipe_reg #(.W(STAGE_W)) u_deskew (
          .clk, .reset, .d(deskew[i][k]), .q(deskew[i][k+1])
        );
      end
      assign q[(i-1)*STAGE_W +: STAGE_W] = deskew[i][STAGES-1-i];
    end
  end

  assign c_out = cout[STAGES-1];
endmodule
