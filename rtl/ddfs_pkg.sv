// ddfs_pkg: sizes shared by the blocks of the direct digital frequency
// synthesizer. The phase accumulator is STAGES slices of STAGE_W bits
// (3 x 4 = 12 bits); the look-up table is addressed by every slice but the
// least significant one (Q[11:4], 8 bits) and returns an 8-bit amplitude.
// The 12-bit width, the 4-bit slices and the 8-bit phase and amplitude
// words follow the published design; nothing in this package is clocked.
package ddfs_pkg;
  localparam int unsigned STAGE_W = 4;                    // bits per accumulator slice
  localparam int unsigned STAGES  = 3;                    // pipeline slices
  localparam int unsigned PHASE_W = STAGE_W * (STAGES - 1); // 8-bit phase brought out
  localparam int unsigned LUT_DW  = 8;                    // amplitude word width

  // Output frequency of the synthesizer, f_out = FCW / 2^N * f_clk, for
  // use by testbenches and scripts (not synthesized logic).
  function automatic real f_out(input int unsigned fcw, input int unsigned n, input real f_clk);
    return real'(fcw) / (2.0 ** n) * f_clk;
  endfunction
endpackage
