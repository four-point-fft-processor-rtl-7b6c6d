// tb_fft4_top: end-to-end test of both processors in fft4_top at default
// parameters, run at the same time on their own ports.
//
// Synchronous side: a stream of samples, one per clock (the published
// example vector 127+255i, 511+439i, 21+21i, 341+53i first), every output
// checked against the reference DFT in the exact clock it is due, 22 clocks
// after its input.
// Asynchronous side: a producer and a consumer with random delays; the
// consumer alternates fast and slow phases so the handshake pipeline both
// runs freely and fills up. Every output is checked in order against the
// reference DFT.
// Mechanisms counted, each must occur: results delivered at the 22-clock
// latency, input handshakes stalled by a full asynchronous pipeline, input
// handshakes that went straight through, and groups whose four outputs were
// all delivered (the expander's done path).
module tb_fft4_top;
  import fft4_pkg::*;
  import tb_fft4_ref_pkg::*;

  localparam int LATENCY = 22;
  localparam int NG_SYNC = 64;
  localparam int NG_ASYNC = 64;

  logic    clk = 0, reset = 1;
  sample_t sync_in_r = 0, sync_in_i = 0, sync_out_r, sync_out_i;
  logic    async_in_req = 0, async_in_ack, async_out_req, async_out_ack = 0;
  sample_t async_in_r = 0, async_in_i = 0, async_out_r, async_out_i;

  cplx_t sstream [NG_SYNC * NPT];
  cplx_t astream [NG_ASYNC * NPT];
  int checks = 0, failures = 0;
  int n_latency_ok = 0, n_stall = 0, n_free = 0, n_groups_out = 0, n_aout = 0;
  bit slow = 0, sync_done = 0, async_in_done = 0;

  fft4_top dut (
    .clk, .reset,
    .sync_in_r, .sync_in_i, .sync_out_r, .sync_out_i,
    .async_in_req, .async_in_ack, .async_in_r, .async_in_i,
    .async_out_req, .async_out_ack, .async_out_r, .async_out_i
  );

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  int ex_in  [4][2] = '{'{127, 255},  '{511, 439}, '{21, 21},     '{341, 53}};
  int ex_out [4][2] = '{'{1000, 768}, '{492, 64},  '{-704, -216}, '{-280, 404}};

  // Synchronous stream: edge e samples sstream[e]; after edge e the output
  // shows sample e + 1 - LATENCY.
  initial begin
    cplx_t g [NPT];
    cplx_t e_v;
    int n, s;
    for (int k = 0; k < NPT; k++) sstream[k] = '{re: sample_t'(ex_in[k][0]), im: sample_t'(ex_in[k][1])};
    for (int i = NPT; i < NG_SYNC * NPT; i++) sstream[i] = rand_sample();
    n = NG_SYNC * NPT;
    wait (!reset);
    for (int e = 0; e < n + LATENCY; e++) begin
      if (e < n) begin sync_in_r = sstream[e].re; sync_in_i = sstream[e].im; end
      else       begin sync_in_r = 0;             sync_in_i = 0;             end
      @(posedge clk);
      #1;
      s = e + 1 - LATENCY;
      if (s >= 0 && s < n) begin
        for (int j = 0; j < NPT; j++) g[j] = sstream[(s / NPT) * NPT + j];
        e_v = dft4_point(g, s % NPT);
        checks++;
        if (sync_out_r != e_v.re || sync_out_i != e_v.im) begin
          failures++;
          $display("sync sample %0d: got %0d,%0d exp %0d,%0d", s, sync_out_r, sync_out_i, e_v.re, e_v.im);
        end else n_latency_ok++;
        if (s < NPT) begin
          checks++;
          if (int'(sync_out_r) != ex_out[s][0] || int'(sync_out_i) != ex_out[s][1]) failures++;
        end
      end
    end
    sync_done = 1;
  end

  // Asynchronous consumer.
  initial begin
    forever begin
      wait_cycles(1);
      if (async_out_req && !async_out_ack) begin
        cplx_t g [NPT];
        cplx_t e_v;
        wait_cycles(slow ? $urandom_range(5, 20) : $urandom_range(0, 2));
        for (int j = 0; j < NPT; j++) g[j] = astream[(n_aout / NPT) * NPT + j];
        e_v = dft4_point(g, n_aout % NPT);
        checks++;
        if (async_out_r != e_v.re || async_out_i != e_v.im) begin
          failures++;
          $display("async output %0d: got %0d,%0d exp %0d,%0d", n_aout, async_out_r, async_out_i, e_v.re, e_v.im);
        end
        n_aout++;
        if (n_aout % NPT == 0) n_groups_out++;
        async_out_ack = 1;
        while (async_out_req) wait_cycles(1);
        wait_cycles($urandom_range(0, 1));
        async_out_ack = 0;
      end
    end
  end

  // Asynchronous producer.
  initial begin
    for (int i = 0; i < NG_ASYNC * NPT; i++) astream[i] = rand_sample();
    wait_cycles(3);
    reset = 0;
    for (int s = 0; s < NG_ASYNC * NPT; s++) begin
      int waited;
      waited = 0;
      slow = ((s / NPT) % 16) >= 8;
      wait_cycles(slow ? $urandom_range(0, 2) : $urandom_range(20, 40));
      async_in_r = astream[s].re;
      async_in_i = astream[s].im;
      async_in_req = 1;
      while (!async_in_ack) begin wait_cycles(1); waited++; end
      if (waited > 12) n_stall++;
      if (waited <= 6) n_free++;
      async_in_req = 0;
      async_in_r = sample_t'($urandom);
      async_in_i = sample_t'($urandom);
      while (async_in_ack) wait_cycles(1);
    end
    async_in_done = 1;
  end

  initial begin
    wait (sync_done && async_in_done && n_aout == NG_ASYNC * NPT);
    wait_cycles(2);
    checks += 4;
    if (n_latency_ok == 0) begin failures++; $display("no result at the 22-clock latency"); end
    if (n_stall == 0)      begin failures++; $display("asynchronous input never stalled"); end
    if (n_free == 0)       begin failures++; $display("asynchronous input never went straight through"); end
    if (n_groups_out != NG_ASYNC) begin failures++; $display("groups delivered %0d", n_groups_out); end
    $display("sync results at latency 22: %0d, async stalls: %0d, unstalled: %0d, async groups: %0d",
             n_latency_ok, n_stall, n_free, n_groups_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
