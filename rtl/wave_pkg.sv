// wave_pkg: shared helper for the DAC waveform generators.
//
// tri_fold turns a phase word into a triangle. The lower bits of the phase
// are passed through while the top bit is 0 (rising half) and mirrored
// (all-ones minus the value) while it is 1 (falling half), so a phase that
// steps by one per clock over 2^(DAC_BITS+1) values gives a triangle that
// rises from 0 to 2^DAC_BITS-1 and falls back. The folding rule is the one
// of the 7-bit "triangle counter" of the lab notes; the function form is
// this design's own, so that the counter and the phase-accumulator
// synthesizer share it.
package wave_pkg;

  // Fold a (DAC_BITS+1)-bit phase, passed right-aligned in a 32-bit word,
  // into a DAC_BITS-bit triangle code (right-aligned in the result).
  function automatic logic [31:0] tri_fold(input logic [31:0] phase, input int unsigned dac_bits);
    logic [31:0] mask;
    logic [31:0] low;
    mask = (32'd1 << dac_bits) - 32'd1;
    low  = phase & mask;
    return phase[dac_bits] ? (mask - low) : low;
  endfunction

endpackage
