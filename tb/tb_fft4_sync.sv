// tb_fft4_sync: end-to-end test of the synchronous processor at its default
// parameters. The first two groups are the published example vectors, the
// rest random. Each output sample is checked in exactly the clock where it
// is due: X(k) of a group is on the output 22 clocks after x(k) was on the
// input (10 + 4*BUF_STAGES). Before the first result the output must be 0.
module tb_fft4_sync;
  import fft4_pkg::*;
  import tb_fft4_ref_pkg::*;

  localparam int LATENCY = 22;
  localparam int NGROUPS = 100;

  logic    clk = 0, reset = 1;
  sample_t in_r, in_i, out_r, out_i;
  cplx_t   stream [$];
  int checks = 0, failures = 0;

  fft4_sync dut (.clk, .reset, .in_r, .in_i, .out_r, .out_i);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Published examples: inputs and the expected outputs.
  int ex_in  [2][4][2] = '{'{'{127, 255}, '{511, 439}, '{21, 21}, '{341, 53}},
                           '{'{127, 255}, '{51, 439},  '{21, 21}, '{341, 53}}};
  int ex_out [2][4][2] = '{'{'{1000, 768}, '{492, 64},  '{-704, -216}, '{-280, 404}},
                           '{'{540, 768},  '{492, 524}, '{-244, -216}, '{-280, -56}}};

  initial begin
    cplx_t g [NPT];
    int n;
    for (int e = 0; e < 2; e++)
      for (int k = 0; k < NPT; k++)
        stream.push_back('{re: sample_t'(ex_in[e][k][0]), im: sample_t'(ex_in[e][k][1])});
    for (int i = 2 * NPT; i < NGROUPS * NPT; i++) stream.push_back(rand_sample());
    n = stream.size();

    in_r = 0; in_i = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    // Edge e samples stream[e]; after edge e the output shows the sample due
    // in the clock after it.
    for (int e = 0; e < n + LATENCY; e++) begin
      if (e < n) begin in_r = stream[e].re; in_i = stream[e].im; end
      else       begin in_r = 0;            in_i = 0;            end
      @(posedge clk);
      #1;
      if (e + 1 - LATENCY >= 0 && e + 1 - LATENCY < n) begin
        int s, grp, k;
        cplx_t exp_v;
        s   = e + 1 - LATENCY;
        grp = s / NPT;
        k   = s % NPT;
        for (int j = 0; j < NPT; j++) g[j] = stream[grp * NPT + j];
        exp_v = dft4_point(g, k);
        checks++;
        if (out_r != exp_v.re || out_i != exp_v.im) begin
          failures++;
          $display("sync out mismatch sample %0d: got %0d,%0d exp %0d,%0d", s, out_r, out_i, exp_v.re, exp_v.im);
        end
        if (grp < 2) begin
          checks++;
          if (int'(out_r) != ex_out[grp][k][0] || int'(out_i) != ex_out[grp][k][1]) begin
            failures++;
            $display("published example %0d point %0d: got %0d,%0d", grp, k, out_r, out_i);
          end
        end
      end else if (e + 1 - LATENCY < 0) begin
        checks++;
        if (out_r != 0 || out_i != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
