// tb_output_ctrl: drives word requests (rr) like the expander and
// acknowledges them from the outside with random delays. Checks that the
// k-th word of each group is X(k) while out_req is high, that rr/rack0 pass
// to out_req/out_ack, and that done rises with the fourth acknowledge and
// falls with the first request of the next group.
module tb_output_ctrl;
  import fft4_pkg::*;

  logic    clk = 0, reset = 1;
  logic    rr = 0, out_ack = 0;
  logic    rack0, done, out_req;
  cplx_t   X [NPT];
  sample_t out_r, out_i;
  int checks = 0, failures = 0;

  output_ctrl dut (.clk, .reset, .rr, .rack0, .done, .X, .out_req, .out_ack, .out_r, .out_i);

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

  initial begin
    for (int k = 0; k < NPT; k++) X[k] = '0;
    wait_cycles(3);
    reset = 0;
    checks++;
    if (done) failures++;
    for (int g = 0; g < 100; g++) begin
      for (int k = 0; k < NPT; k++) X[k] = '{re: sample_t'($urandom), im: sample_t'($urandom)};
      for (int k = 0; k < NPT; k++) begin
        rr = 1;
        wait_cycles(1);
        checks++;
        if (!out_req) failures++;
        if (k == 0) begin
          wait_cycles(1);
          checks++;
          if (done) begin failures++; $display("done not cleared"); end
        end
        wait_cycles($urandom_range(0, 3));
        checks++;
        if (out_r != X[k].re || out_i != X[k].im) begin
          failures++;
          $display("group %0d word %0d: got %0d,%0d", g, k, out_r, out_i);
        end
        out_ack = 1;
        #1;
        checks++;
        if (!rack0) failures++;
        wait_cycles(1);
        checks++;
        if (done != (k == NPT - 1)) begin failures++; $display("done=%0d at word %0d", done, k); end
        rr = 0;
        wait_cycles($urandom_range(0, 2));
        out_ack = 0;
        wait_cycles(1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
