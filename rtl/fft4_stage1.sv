// fft4_stage1: first add/subtract stage of the four-point FFT.
//
// From four complex input samples x(0..3) it forms, at the 20-bit internal
// width,
//   a = x(0) + x(2)    b = x(1) + x(3)
//   c = x(0) - x(2)    d = x(1) - x(3)
// with the real and imaginary parts handled separately (eight adders in all).
// No multiplier is needed. Purely combinational; the output order is
// s[0]=a, s[1]=b, s[2]=c, s[3]=d.
module fft4_stage1
  import fft4_pkg::*;
(
  input  cplx_t   x [NPT],
  output cplx_w_t s [NPT]
);

  always_comb begin
    s[0].re = widen(x[0].re) + widen(x[2].re);
    s[0].im = widen(x[0].im) + widen(x[2].im);
    s[1].re = widen(x[1].re) + widen(x[3].re);
    s[1].im = widen(x[1].im) + widen(x[3].im);
    s[2].re = widen(x[0].re) - widen(x[2].re);
    s[2].im = widen(x[0].im) - widen(x[2].im);
    s[3].re = widen(x[1].re) - widen(x[3].re);
    s[3].im = widen(x[1].im) - widen(x[3].im);
  end

endmodule
