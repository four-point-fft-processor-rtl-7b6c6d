// fft4_pkg: widths, complex sample types and helpers shared by the
// synchronous and the asynchronous FFT-4 processors.
//
// A sample is a complex number with a 16-bit two's-complement real part and
// a 16-bit imaginary part (32 bits per sample). Inside the FFT-4 arithmetic
// the parts widen to 20 bits so that the two add/subtract stages cannot
// overflow; the results are cut back to 16 bits (the low 16 bits are kept,
// nothing is rounded or saturated) after the second stage.
package fft4_pkg;

  // Width of the real or imaginary part of an input/output sample.
  parameter int unsigned DW = 16;
  // Width of the real or imaginary part inside the arithmetic stages.
  parameter int unsigned IW = 20;
  // Points per transform.
  parameter int unsigned NPT = 4;

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [IW-1:0] wide_t;

  // One complex sample at the interface width (re in the upper half).
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // One complex value at the internal width.
  typedef struct packed {
    wide_t re;
    wide_t im;
  } cplx_w_t;

  // Sign-extend an interface-width value to the internal width.
  function automatic wide_t widen(input sample_t s);
    return {{(IW - DW){s[DW-1]}}, s};
  endfunction

  // Keep the low DW bits of an internal value.
  function automatic sample_t trunc(input wide_t w);
    return sample_t'(w);
  endfunction

endpackage
