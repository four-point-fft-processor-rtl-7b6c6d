// tb_expander: an FFT-side driver raises ri with random gaps; an output-side
// model acknowledges each word request with random delays and raises done
// when the fourth acknowledge of a group rises (clearing it at the next
// group's first request). Checks four word requests per FFT request, that
// lo rises only after the fourth word's handshake has returned to zero, and
// that lo falls after ri falls.
module tb_expander;
  logic clk = 0, reset = 1;
  logic ri = 0, ri0 = 0, done = 0;
  logic lo, ro1;
  int checks = 0, failures = 0;
  int words = 0, acks_in_group = 0;

  expander dut (.clk, .reset, .ri, .lo, .ro1, .ri0, .done);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Output side.
  initial begin
    forever begin
      wait_cycles(1);
      if (ro1 && !ri0) begin
        if (done) begin done = 0; acks_in_group = 0; end
        wait_cycles($urandom_range(0, 4));
        ri0 = 1;
        words++;
        acks_in_group++;
        if (acks_in_group == 4) done = 1;
        while (ro1) wait_cycles(1);
        wait_cycles($urandom_range(0, 3));
        ri0 = 0;
      end
    end
  end

  initial begin
    wait_cycles(3);
    reset = 0;
    for (int g = 0; g < 100; g++) begin
      int w0;
      wait_cycles($urandom_range(0, 5));
      w0 = words;
      ri = 1;
      while (!lo) begin
        wait_cycles(1);
        if (lo) begin
          checks++;
          if (words - w0 != 4 || ri0 || ro1) begin
            failures++;
            $display("group %0d: lo after %0d words (ri0=%0d ro1=%0d)", g, words - w0, ri0, ro1);
          end
        end
      end
      wait_cycles($urandom_range(0, 3));
      checks++;
      if (!lo) failures++;  // lo held while ri high
      ri = 0;
      wait_cycles(1);
      while (lo) wait_cycles(1);
      checks++;
      if (ro1) failures++;
    end
    wait_cycles(20);
    checks++;
    if (words != 400) begin failures++; $display("words=%0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
