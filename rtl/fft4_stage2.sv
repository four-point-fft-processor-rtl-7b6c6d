// fft4_stage2: second add/subtract stage of the four-point FFT.
//
// From a, b, c, d (s[0..3], 20-bit parts) it forms the transform
//   X(0) = a + b
//   X(1) = (Re c + Im d) + j(Im c - Re d)      (c - j d)
//   X(2) = a - b
//   X(3) = (Re c - Im d) + j(Im c + Re d)      (c + j d)
// Multiplying by -j or +j is only a swap of real and imaginary parts with a
// sign change, so the stage is again eight adders. The sums are formed at 20
// bits and the low 16 bits of each are output (truncation, no rounding or
// saturation). Purely combinational.
module fft4_stage2
  import fft4_pkg::*;
(
  input  cplx_w_t s [NPT],
  output cplx_t   X [NPT]
);

  wide_t sum [2*NPT];

  always_comb begin
    sum[0] = s[0].re + s[1].re;
    sum[1] = s[0].im + s[1].im;
    sum[2] = s[2].re + s[3].im;
    sum[3] = s[2].im - s[3].re;
    sum[4] = s[0].re - s[1].re;
    sum[5] = s[0].im - s[1].im;
    sum[6] = s[2].re - s[3].im;
    sum[7] = s[2].im + s[3].re;
    for (int k = 0; k < NPT; k++) begin
      X[k].re = trunc(sum[2*k]);
      X[k].im = trunc(sum[2*k+1]);
    end
  end

endmodule
