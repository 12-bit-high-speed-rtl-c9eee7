// ddfs_top: digital core of the direct digital frequency synthesizer.
//
// A pipelined phase accumulator adds the frequency control word every clock;
// its upper bits address a sine table whose output word drives an external
// DAC, followed by an analog low-pass filter, to give a sine of
// f_out = fcw / 2^N * f_clk (N = 12 here). The DAC and filter are outside
// this module; lut_out is the DAC input.
//
// Interface: clk, reset (asynchronous, active high), fcw[11:0], c_in
// (carry into the accumulator, normally 0). Outputs: phase[7:0] (accumulator
// bits [11:4]), c_out (combinational carry out of the top accumulator slice,
// high in the clock before phase wraps) and lut_out[7:0] (offset-binary
// sine sample).
//
// Timing: with P(t+1) = P(t) + fcw(t) an ideal accumulator cleared by reset,
// phase(t) = P(t-STAGES)[11:4] and lut_out(t) = sin table of phase(t-1).
// One sample comes out every clock.
//
// The accumulator-then-table structure follows the published design; the
// pin names are this design's.
module ddfs_top #(
  parameter int unsigned STAGE_W = ddfs_pkg::STAGE_W,
  parameter int unsigned STAGES  = ddfs_pkg::STAGES,
  parameter int unsigned LUT_DW  = ddfs_pkg::LUT_DW
) (
  input  logic                          clk,
  input  logic                          reset,
  input  logic [STAGE_W*STAGES-1:0]     fcw,
  input  logic                          c_in,
  output logic [STAGE_W*(STAGES-1)-1:0] phase,
  output logic                          c_out,
  output logic [LUT_DW-1:0]             lut_out
);
  phase_acc #(.STAGE_W(STAGE_W), .STAGES(STAGES)) u_pa (
    .clk, .reset, .fcw, .c_in, .q(phase), .c_out
  );

  sine_lut #(.AW(STAGE_W*(STAGES-1)), .DW(LUT_DW)) u_lut (
    .clk, .phase, .amp(lut_out)
  );
endmodule
