// tb_fft4_sync_core: holds a new random group of four samples for each
// quarter-rate enable pulse and checks that the transform of the group
// captured at pulse p is on X after pulse p+1+BUF_STAGES, and that X does
// not change between pulses.
module tb_fft4_sync_core;
  import fft4_pkg::*;
  import tb_fft4_ref_pkg::*;

  localparam int unsigned BUF = 3;

  logic  clk = 0, reset = 1, en = 0;
  cplx_t x [NPT];
  cplx_t X [NPT];
  cplx_t groups [128][NPT];
  int checks = 0, failures = 0;

  fft4_sync_core #(.BUF_STAGES(BUF)) dut (.clk, .reset, .en, .x, .X);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t g [NPT];
    cplx_t held [NPT];
    for (int k = 0; k < NPT; k++) x[k] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int p = 0; p < 120; p++) begin
      for (int k = 0; k < NPT; k++) g[k] = rand_sample();
      x = g;
      groups[p] = g;
      repeat (3) @(posedge clk);
      #1 en = 1;
      @(posedge clk);
      #1 en = 0;
      if (p >= 1 + BUF) begin
        for (int k = 0; k < NPT; k++) begin
          checks++;
          if (X[k] != dft4_point(groups[p - 1 - BUF], k)) begin
            failures++;
            $display("core mismatch pulse %0d point %0d", p, k);
          end
        end
      end
      held = X;
      @(posedge clk);
      #1;
      checks++;
      if (X != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
