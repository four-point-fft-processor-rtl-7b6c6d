// tb_fft4_stage1: checks the first add/subtract stage against integer sums
// for corner values (largest and smallest 16-bit parts) and random inputs.
module tb_fft4_stage1;
  import fft4_pkg::*;

  cplx_t   x [NPT];
  cplx_w_t s [NPT];
  int checks = 0, failures = 0;

  fft4_stage1 dut (.x, .s);

  task automatic check_one();
    int er[4], ei[4];
    #1;
    er[0] = int'(x[0].re) + int'(x[2].re); ei[0] = int'(x[0].im) + int'(x[2].im);
    er[1] = int'(x[1].re) + int'(x[3].re); ei[1] = int'(x[1].im) + int'(x[3].im);
    er[2] = int'(x[0].re) - int'(x[2].re); ei[2] = int'(x[0].im) - int'(x[2].im);
    er[3] = int'(x[1].re) - int'(x[3].re); ei[3] = int'(x[1].im) - int'(x[3].im);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(s[k].re) != er[k] || int'(s[k].im) != ei[k]) begin
        failures++;
        $display("stage1 mismatch k=%0d got %0d,%0d exp %0d,%0d", k, s[k].re, s[k].im, er[k], ei[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NPT; k++) x[k] = '{re: 16'sh7fff, im: 16'sh8000};
    x[2] = '{re: 16'sh8000, im: 16'sh7fff};
    check_one();
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < NPT; k++) begin
        x[k].re = sample_t'($urandom);
        x[k].im = sample_t'($urandom);
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
