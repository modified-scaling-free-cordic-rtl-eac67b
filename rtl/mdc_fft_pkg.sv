// mdc_fft_pkg: constants and helper functions shared by the two-parallel
// radix-2^2 MDC FFT/IFFT pipeline.
//
// The transform size is fixed at 16 points by the structure of the
// pipeline (four butterfly stages with 4, 2 and 1 delay commutators). The
// data and twiddle widths are this design's own choice: 16-bit input
// samples, a data path five bits wider (four butterfly stages of word
// growth plus one guard bit for rotations) and 16-bit twiddle factors in
// Q1.14.
package mdc_fft_pkg;

  localparam int unsigned N_POINTS = 16;           // transform size
  localparam int unsigned LOG2N    = 4;            // butterfly stages
  localparam int unsigned TW_AW    = 3;            // twiddle address width
  localparam int unsigned GROWTH   = LOG2N + 1;    // data path extra bits

  // Reverses the three bits of a position within a frame of 8 pairs.
  function automatic logic [2:0] bitrev3(input logic [2:0] v);
    return {v[0], v[1], v[2]};
  endfunction

  // Bit b of a 3-bit position.
  function automatic logic bitsel(input logic [2:0] v, input logic [1:0] b);
    return v[b];
  endfunction

endpackage
