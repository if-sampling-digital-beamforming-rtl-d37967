// bsp_pkg: types and helpers shared by the bit-stream beamformer.
//
// The band-pass delta-sigma modulators deliver a five-level stream with the
// values -2, -1, 0, +1, +2. Because the sample rate is four times the IF, the
// down-conversion LO sequences cos[n*pi/2] and sin[n*pi/2] only take the values
// -1, 0, +1 and are fully described by the sample index n modulo 4. Both facts
// come from the thesis; the 3-bit two's-complement encoding of a five-level
// value and the 2-bit LO phase encoding are this design's choice.
package bsp_pkg;

  // Five-level sample, two's complement, legal range -2..+2.
  typedef logic signed [2:0] lvl5_t;

  // Sample index n modulo 4; selects the LO values cos[n*pi/2], sin[n*pi/2].
  typedef logic [1:0] lo_phase_t;

  localparam lo_phase_t LO_PH0 = 2'd0;  // cos = +1, sin =  0
  localparam lo_phase_t LO_PH1 = 2'd1;  // cos =  0, sin = +1
  localparam lo_phase_t LO_PH2 = 2'd2;  // cos = -1, sin =  0
  localparam lo_phase_t LO_PH3 = 2'd3;  // cos =  0, sin = -1

  // Negation of a five-level value: only relabels the level, no carry chain
  // beyond three bits.
  function automatic lvl5_t lvl5_neg(lvl5_t x);
    return -x;
  endfunction

  // True when x holds one of the five legal levels.
  function automatic logic lvl5_legal(lvl5_t x);
    return (x >= -3'sd2) && (x <= 3'sd2);
  endfunction

endpackage
