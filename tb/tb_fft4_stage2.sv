// tb_fft4_stage2: checks the second add/subtract stage: X(0)=a+b,
// X(1)=c-jd, X(2)=a-b, X(3)=c+jd, each part truncated to 16 bits, for random
// 18-bit a..d (the range the first stage can produce).
module tb_fft4_stage2;
  import fft4_pkg::*;

  cplx_w_t s [NPT];
  cplx_t   X [NPT];
  int checks = 0, failures = 0;

  fft4_stage2 dut (.s, .X);

  function automatic wide_t r18();
    return wide_t'($signed(18'($urandom)));
  endfunction

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int er[4], ei[4];
      for (int k = 0; k < NPT; k++) begin
        s[k].re = r18();
        s[k].im = r18();
      end
      #1;
      er[0] = int'(s[0].re) + int'(s[1].re); ei[0] = int'(s[0].im) + int'(s[1].im);
      er[1] = int'(s[2].re) + int'(s[3].im); ei[1] = int'(s[2].im) - int'(s[3].re);
      er[2] = int'(s[0].re) - int'(s[1].re); ei[2] = int'(s[0].im) - int'(s[1].im);
      er[3] = int'(s[2].re) - int'(s[3].im); ei[3] = int'(s[2].im) + int'(s[3].re);
      for (int k = 0; k < NPT; k++) begin
        checks++;
        if (X[k].re != sample_t'(er[k]) || X[k].im != sample_t'(ei[k])) begin
          failures++;
          $display("stage2 mismatch k=%0d got %0d,%0d exp %0d,%0d", k, X[k].re, X[k].im,
                   sample_t'(er[k]), sample_t'(ei[k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
