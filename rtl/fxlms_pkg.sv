// Shared types and arithmetic helpers of the FXLMS noise canceller.
//
// All audio-rate signals of the design are 16-bit two's-complement samples
// in Q1.15 (range -1 .. 1 - 2^-15). The 16-bit width follows the stated
// sample format (16 kbit/s at 1 ksample/s, 16-bit buses); the Q1.15
// interpretation is this design's choice. Every block saturates its result
// to this range instead of wrapping.
package fxlms_pkg;

  localparam int unsigned DATA_W = 16;   // sample width
  localparam int unsigned FRAC_W = 15;   // fractional bits of a sample

  typedef logic signed [DATA_W-1:0] sample_t;

  localparam sample_t SAMPLE_MAX = sample_t'(2 ** (DATA_W - 1) - 1);
  localparam sample_t SAMPLE_MIN = sample_t'(-(2 ** (DATA_W - 1)));

  // Clamp a wide signed value to the sample range.
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    if (v > 64'(signed'(SAMPLE_MAX))) return SAMPLE_MAX;
    if (v < 64'(signed'(SAMPLE_MIN))) return SAMPLE_MIN;
    return sample_t'(v);
  endfunction

  // True when v lies outside the sample range (a saturation event).
  function automatic logic out_of_range(input logic signed [63:0] v);
    return (v > 64'(signed'(SAMPLE_MAX))) || (v < 64'(signed'(SAMPLE_MIN)));
  endfunction

endpackage
