// tb_sync_input_sr: feeds a random sample stream and checks that after
// every clock register k holds the sample that entered 3-k clocks earlier.
module tb_sync_input_sr;
  import fft4_pkg::*;

  logic  clk = 0, reset = 1;
  cplx_t din;
  cplx_t x [NPT];
  cplx_t hist [$];
  int checks = 0, failures = 0;

  sync_input_sr dut (.clk, .reset, .din, .x);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < NPT; k++) begin
      checks++;
      if (x[k] != '0) failures++;
    end
    reset = 0;
    for (int i = 0; i < 200; i++) begin
      din = '{re: sample_t'($urandom), im: sample_t'($urandom)};
      hist.push_back(din);
      @(posedge clk);
      #1;
      if (hist.size() >= NPT) begin
        for (int k = 0; k < NPT; k++) begin
          checks++;
          if (x[k] != hist[hist.size() - NPT + k]) begin
            failures++;
            $display("sr mismatch at %0d reg %0d", i, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
