// tb_input_ctrl: all request patterns and random acknowledge patterns;
// checks the channel-to-block routing (x(0)<-r1o0, x(1)<-r2o0, x(2)<-r1o1,
// x(3)<-r2o1, real in block 2k, imaginary in 2k+1) and that a channel is
// acknowledged only when both blocks of its pair are.
module tb_input_ctrl;
  import fft4_pkg::*;

  logic r1o0, r1o1, r2o0, r2o1, r1i0, r1i1, r2i0, r2i1;
  logic [7:0] lab_li, lab_lo;
  int checks = 0, failures = 0;

  input_ctrl dut (.r1o0, .r1i0, .r1o1, .r1i1, .r2o0, .r2i0, .r2o1, .r2i1, .lab_li, .lab_lo);

  initial begin
    for (int i = 0; i < 16 * 256; i++) begin
      logic [3:0] req, ack_exp, ack;
      logic [7:0] li_exp;
      req = 4'(i);  // sample order x0..x3
      {r2o1, r1o1, r2o0, r1o0} = req;
      lab_lo = 8'(i >> 4);
      #1;
      for (int k = 0; k < 4; k++) begin
        li_exp[2*k]   = req[k];
        li_exp[2*k+1] = req[k];
        ack_exp[k]    = lab_lo[2*k] & lab_lo[2*k+1];
      end
      ack = {r2i1, r1i1, r2i0, r1i0};
      checks++;
      if (lab_li != li_exp || ack != ack_exp) begin
        failures++;
        $display("req=%b lo=%b: li=%b ack=%b", req, lab_lo, lab_li, ack);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
