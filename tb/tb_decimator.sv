// tb_decimator: a four-phase left driver and two right-hand responders with
// random delays. Checks that the n-th left request is passed to channel
// n mod 2, that every left request is acknowledged exactly once and only
// after the chosen channel has acknowledged, that lo falls only after li
// and the channel acknowledge have fallen, and the one-clock response of
// each state of the controller when the environment answers at once.
module tb_decimator;
  logic clk = 0, reset = 1;
  logic li = 0, ri0 = 0, ri1 = 0;
  logic lo, ro0, ro1;
  int checks = 0, failures = 0;
  int n_req = 0, n_ch [2] = '{0, 0}, n_lo = 0;
  logic lo_q = 0, ro0_q = 0, ro1_q = 0;
  int last_ch = 1;
  bit fast = 0;

  decimator dut (.clk, .reset, .li, .lo, .ro0, .ri0, .ro1, .ri1);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Right-hand responders.
  task automatic respond(input int ch);
    forever begin
      @(posedge clk);
      #1;
      if ((ch == 0 ? ro0 : ro1) && !(ch == 0 ? ri0 : ri1)) begin
        if (!fast) wait_cycles($urandom_range(0, 4));
        if (ch == 0) ri0 = 1; else ri1 = 1;
        while (ch == 0 ? ro0 : ro1) wait_cycles(1);
        if (!fast) wait_cycles($urandom_range(0, 4));
        if (ch == 0) ri0 = 0; else ri1 = 0;
      end
    end
  endtask

  // Monitor, sampling mid-cycle. The controller reacts at a clock edge to
  // the inputs seen at the previous mid-cycle sample (li_p, ri0_p, ri1_p).
  logic li_p = 0, ri0_p = 0, ri1_p = 0;
  always @(negedge clk) if (!reset) begin
    if (ro0 && !ro0_q) begin
      checks++; n_ch[0]++;
      if (last_ch != 1) begin failures++; $display("ro0 out of turn"); end
      last_ch = 0;
    end
    if (ro1 && !ro1_q) begin
      checks++; n_ch[1]++;
      if (last_ch != 0) begin failures++; $display("ro1 out of turn"); end
      last_ch = 1;
    end
    if (lo && !lo_q) begin
      n_lo++;
      checks++;
      if (!(last_ch == 0 ? ri0_p : ri1_p)) begin failures++; $display("lo before channel ack"); end
    end
    if (!lo && lo_q) begin
      checks++;
      if (li_p || (last_ch == 0 ? ri0_p : ri1_p)) begin failures++; $display("lo fell early"); end
    end
    lo_q = lo; ro0_q = ro0; ro1_q = ro1;
    li_p = li; ri0_p = ri0; ri1_p = ri1;
  end

  initial begin
    fork
      respond(0);
      respond(1);
    join_none
    wait_cycles(3);
    reset = 0;
    // Fast environment: check per-state response time.
    fast = 1;
    for (int i = 0; i < 4; i++) begin
      int t0, t;
      li = 1; n_req++;
      t0 = $time;
      while (!lo) wait_cycles(1);
      t = ($time - t0) / 10;
      // li+ -> ro+ takes one clock, the responder answers in the same
      // cycle, ri+ -> lo+ takes one more clock.
      checks++;
      if (t != 2) begin failures++; $display("fast handshake took %0d clocks", t); end
      li = 0;
      while (lo) wait_cycles(1);
    end
    fast = 0;
    for (int i = 0; i < 200; i++) begin
      wait_cycles($urandom_range(0, 3));
      li = 1; n_req++;
      while (!lo) wait_cycles(1);
      wait_cycles($urandom_range(0, 3));
      li = 0;
      while (lo) wait_cycles(1);
    end
    wait_cycles(10);
    checks++;
    if (n_lo != n_req || n_ch[0] + n_ch[1] != n_req || n_ch[0] != n_ch[1]) begin
      failures++;
      $display("counts req=%0d lo=%0d ch0=%0d ch1=%0d", n_req, n_lo, n_ch[0], n_ch[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
