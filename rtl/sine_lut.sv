// sine_lut: phase-to-amplitude converter of the synthesizer, a ROM holding
// one full period of a sine wave.
//
// Entry i of the 2^AW-entry table is
//   amp(i) = floor( H + H*sin(2*pi*i / 2^AW) + 0.5 ),  H = (2^DW - 1) / 2,
// an offset-binary sample that spans 0 .. 2^DW-1 with mid-scale 2^(DW-1)
// at phase 0. The table is computed while the design is elaborated, so it
// follows AW and DW and needs no data file.
//
// Interface: phase[AW-1:0] in (the accumulator's upper bits), amp[DW-1:0]
// out. Timing: amp is registered, so it shows the sample for the phase
// presented one rising edge earlier. The register has no reset.
//
// A clocked sine table addressed by the accumulator's upper bits, with 8-bit
// address and 8-bit output, follows the published design. The full-period
// (not quarter-wave) table and the offset-binary coding are choices of this
// design.
module sine_lut #(
  parameter int unsigned AW = ddfs_pkg::PHASE_W,
  parameter int unsigned DW = ddfs_pkg::LUT_DW
) (
  input  logic          clk,
  input  logic [AW-1:0] phase,
  output logic [DW-1:0] amp
);
  typedef logic [DW-1:0] rom_t [2**AW];

  function automatic rom_t make_rom();
    rom_t r;
    real  half, s;
    half = (2.0 ** DW - 1.0) / 2.0;
    for (int i = 0; i < 2**AW; i++) begin
      s    = $sin(2.0 * 3.14159265358979323846 * real'(i) / (2.0 ** AW));
      r[i] = DW'(int'($floor(half + half * s + 0.5)));
    end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  always_ff @(posedge clk) amp <= ROM[phase];
endmodule
