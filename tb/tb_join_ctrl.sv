// tb_join_ctrl: checks the AND of the eight block requests, the fan-out of
// the FFT-4 acknowledge and the gathering of block data into four complex
// samples, for every request pattern and random data.
module tb_join_ctrl;
  import fft4_pkg::*;

  logic [7:0] lab_ro, lab_ri;
  sample_t    lab_dout [8];
  logic       lreq, lack;
  cplx_t      x [NPT];
  int checks = 0, failures = 0;

  join_ctrl dut (.lab_ro, .lab_ri, .lab_dout, .lreq, .lack, .x);

  initial begin
    for (int i = 0; i < 512; i++) begin
      lab_ro = 8'(i);
      lack = i[8];
      for (int k = 0; k < 8; k++) lab_dout[k] = sample_t'($urandom);
      #1;
      checks++;
      if (lreq != (lab_ro == 8'hff)) begin failures++; $display("lreq wrong for %b", lab_ro); end
      checks++;
      if (lab_ri != {8{lack}}) failures++;
      for (int k = 0; k < NPT; k++) begin
        checks++;
        if (x[k].re != lab_dout[2*k] || x[k].im != lab_dout[2*k+1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
