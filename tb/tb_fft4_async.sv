// tb_fft4_async: a producer offers random groups of four samples on the
// li/lo handshake, a consumer with random (sometimes long) delays takes the
// results on ro0/ri0. Checks each result against the reference DFT, in
// order, that the result is held while requested, the two-clock response
// of an empty module, and that a new group is accepted while the previous
// result still waits for the consumer (the two handshake stages overlap).
module tb_fft4_async;
  import fft4_pkg::*;
  import tb_fft4_ref_pkg::*;

  logic  clk = 0, reset = 1;
  logic  li = 0, ri0 = 0, lo, ro0;
  cplx_t din  [NPT];
  cplx_t dout [NPT];
  cplx_t sent [256][NPT];
  int checks = 0, failures = 0, n_rx = 0, n_tx = 0, overlaps = 0;
  bit slow = 0;

  fft4_async dut (.clk, .reset, .li, .din, .lo, .dout, .ro0, .ri0);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    forever begin
      wait_cycles(1);
      if (ro0 && !ri0) begin
        cplx_t g [NPT];
        cplx_t v [NPT];
        v = dout;
        wait_cycles(slow ? $urandom_range(4, 15) : $urandom_range(0, 2));
        checks++;
        if (dout != v) begin failures++; $display("result changed while requested"); end
        g = sent[n_rx];
        for (int k = 0; k < NPT; k++) begin
          checks++;
          if (dout[k] != dft4_point(g, k)) begin
            failures++;
            $display("group %0d point %0d: got %0d,%0d", n_rx, k, dout[k].re, dout[k].im);
          end
        end
        n_rx++;
        ri0 = 1;
        while (ro0) wait_cycles(1);
        ri0 = 0;
      end
    end
  end

  initial begin
    for (int k = 0; k < NPT; k++) din[k] = '0;
    wait_cycles(3);
    reset = 0;
    // Empty module: result requested two clocks after li rises.
    for (int k = 0; k < NPT; k++) din[k] = rand_sample();
    sent[n_tx] = din; li = 1; n_tx++;
    wait_cycles(2);
    checks++;
    if (!ro0) begin failures++; $display("empty-module latency is not two clocks"); end
    while (!lo) wait_cycles(1);
    li = 0;
    while (lo) wait_cycles(1);
    for (int i = 0; i < 200; i++) begin
      slow = (i % 40) >= 20;
      wait_cycles($urandom_range(0, 3));
      for (int k = 0; k < NPT; k++) din[k] = rand_sample();
      sent[n_tx] = din; li = 1; n_tx++;
      while (!lo) wait_cycles(1);
      if (ro0) overlaps++;
      li = 0;
      while (lo) wait_cycles(1);
    end
    while (n_rx != n_tx) wait_cycles(1);
    checks++;
    if (overlaps == 0) begin failures++; $display("stages never overlapped"); end
    $display("overlaps=%0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
