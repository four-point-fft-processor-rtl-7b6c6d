// tb_fft4_ref_pkg: reference model for the FFT-4 testbenches.
//
// Computes the four-point DFT directly from its definition,
//   X(k) = sum_n x(n) * (-j)^(k*n),
// in 32-bit integers, then keeps the low 16 bits of each part as the
// hardware does. It shares no code with the design's add/subtract stages.
package tb_fft4_ref_pkg;
  import fft4_pkg::*;

  typedef int cint_t [2];  // [0] real, [1] imaginary

  function automatic cint_t rot(input int re, input int im, input int m);
    cint_t r;
    case (m % 4)
      0: begin r[0] =  re; r[1] =  im; end   // * 1
      1: begin r[0] =  im; r[1] = -re; end   // * -j
      2: begin r[0] = -re; r[1] = -im; end   // * -1
      default: begin r[0] = -im; r[1] = re; end  // * j
    endcase
    return r;
  endfunction

  function automatic cplx_t dft4_point(input cplx_t x [NPT], input int k);
    int sr, si;
    cint_t t;
    cplx_t y;
    sr = 0; si = 0;
    for (int n = 0; n < NPT; n++) begin
      t = rot(int'(x[n].re), int'(x[n].im), k * n);
      sr += t[0];
      si += t[1];
    end
    y.re = sample_t'(sr);
    y.im = sample_t'(si);
    return y;
  endfunction

  function automatic cplx_t rand_sample();
    cplx_t s;
    s.re = sample_t'($urandom);
    s.im = sample_t'($urandom);
    return s;
  endfunction

endpackage
