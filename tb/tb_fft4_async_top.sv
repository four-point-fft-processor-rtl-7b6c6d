// tb_fft4_async_top: end-to-end test of the handshake processor. A producer
// sends a stream of samples on in_req/in_ack (the published example vector
// first, then random groups); a consumer takes results on out_req/out_ack
// with random delays, slow in some phases. Every output sample is checked,
// in order, against the reference DFT of its group. Counted: input requests
// that had to wait for the pipeline (stalls from a slow output), and the
// published example's outputs 540+768i, 492+524i, -244-216i, -280-56i.
module tb_fft4_async_top;
  import fft4_pkg::*;
  import tb_fft4_ref_pkg::*;

  localparam int NGROUPS = 120;
  localparam int NS = NGROUPS * NPT;

  logic    clk = 0, reset = 1;
  logic    in_req = 0, out_ack = 0;
  logic    in_ack, out_req;
  sample_t in_r = 0, in_i = 0, out_r, out_i;
  cplx_t   stream [NS];
  int checks = 0, failures = 0, n_out = 0, stalls = 0, free_runs = 0;
  int min_wait = 1000;
  bit slow = 0;

  fft4_async_top dut (.clk, .reset, .in_req, .in_ack, .in_r, .in_i,
                      .out_req, .out_ack, .out_r, .out_i);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  int ex_in  [4][2] = '{'{127, 255}, '{51, 439},  '{21, 21},     '{341, 53}};
  int ex_out [4][2] = '{'{540, 768}, '{492, 524}, '{-244, -216}, '{-280, -56}};

  // Consumer.
  initial begin
    forever begin
      wait_cycles(1);
      if (out_req && !out_ack) begin
        cplx_t g [NPT];
        cplx_t e;
        int grp, k;
        wait_cycles(slow ? $urandom_range(5, 20) : $urandom_range(0, 2));
        grp = n_out / NPT;
        k   = n_out % NPT;
        for (int j = 0; j < NPT; j++) g[j] = stream[grp * NPT + j];
        e = dft4_point(g, k);
        checks++;
        if (out_r != e.re || out_i != e.im) begin
          failures++;
          $display("output %0d: got %0d,%0d exp %0d,%0d", n_out, out_r, out_i, e.re, e.im);
        end
        if (grp == 0) begin
          checks++;
          if (int'(out_r) != ex_out[k][0] || int'(out_i) != ex_out[k][1]) failures++;
        end
        n_out++;
        out_ack = 1;
        while (out_req) wait_cycles(1);
        wait_cycles($urandom_range(0, 1));
        out_ack = 0;
      end
    end
  end

  initial begin
    for (int k = 0; k < NPT; k++) stream[k] = '{re: sample_t'(ex_in[k][0]), im: sample_t'(ex_in[k][1])};
    for (int s = NPT; s < NS; s++) stream[s] = rand_sample();
    wait_cycles(3);
    reset = 0;
    for (int s = 0; s < NS; s++) begin
      int waited;
      waited = 0;
      slow = ((s / NPT) % 30) >= 15;
      // While the output is fast the producer is slow, and the reverse.
      wait_cycles(slow ? $urandom_range(0, 2) : $urandom_range(20, 40));
      in_r = stream[s].re;
      in_i = stream[s].im;
      in_req = 1;
      while (!in_ack) begin wait_cycles(1); waited++; end
      if (waited > 12) stalls++;
      if (waited <= 6) free_runs++;
      if (waited < min_wait) min_wait = waited;
      in_req = 0;
      in_r = sample_t'($urandom);
      in_i = sample_t'($urandom);
      while (in_ack) wait_cycles(1);
    end
    while (n_out != NS) wait_cycles(1);
    checks++;
    if (stalls == 0) begin failures++; $display("input never stalled"); end
    checks++;
    if (free_runs == 0) begin failures++; $display("input never went straight through"); end
    $display("stalls=%0d unstalled=%0d fastest=%0d outputs=%0d", stalls, free_runs, min_wait, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
