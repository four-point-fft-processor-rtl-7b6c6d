// tb_linear_async_block: a left producer sends random words with four-phase
// handshakes, a right consumer takes them with random delays. Checks that
// the consumer receives every word once and in order, that dout holds while
// ro0 is high, that a word offered while the stage is still full is not
// taken until the right handshake has finished (stall), and the one-clock
// response of an empty stage.
module tb_linear_async_block;
  localparam int W = 20;

  logic clk = 0, reset = 1;
  logic li = 0, ri0 = 0;
  logic lo, ro0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, n_rx = 0, stalls = 0;
  bit slow_right = 0;

  linear_async_block #(.WIDTH(W)) dut (.clk, .reset, .li, .din, .lo, .dout, .ro0, .ri0);

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

  // Right-hand consumer.
  initial begin
    forever begin
      wait_cycles(1);
      if (ro0 && !ri0) begin
        logic [W-1:0] v;
        v = dout;
        wait_cycles(slow_right ? $urandom_range(3, 12) : $urandom_range(0, 3));
        checks++;
        if (dout != v) begin failures++; $display("dout changed while requested"); end
        checks++;
        if (sent.size() == 0 || dout != sent[0]) begin
          failures++;
          $display("received %h unexpected", dout);
        end
        if (sent.size() != 0) void'(sent.pop_front());
        n_rx++;
        ri0 = 1;
        while (ro0) wait_cycles(1);
        wait_cycles($urandom_range(0, 2));
        ri0 = 0;
      end
    end
  end

  initial begin
    int n_tx = 0;
    wait_cycles(3);
    reset = 0;
    // Response time of an empty stage: li+ -> lo+ and ro0+ after one clock.
    din = W'($urandom); li = 1; sent.push_back(din); n_tx++;
    wait_cycles(1);
    checks++;
    if (!lo || !ro0 || dout != din) begin failures++; $display("no one-clock capture"); end
    li = 0;
    while (lo) wait_cycles(1);
    for (int i = 0; i < 300; i++) begin
      int waited;
      waited = 0;
      slow_right = (i % 50) >= 25;
      wait_cycles($urandom_range(0, 2));
      din = W'($urandom); li = 1; sent.push_back(din); n_tx++;
      while (!lo) begin wait_cycles(1); waited++; end
      if (waited > 1) stalls++;
      din = W'($urandom);  // data may change once acknowledged
      wait_cycles($urandom_range(0, 2));
      li = 0;
      while (lo) wait_cycles(1);
    end
    while (n_rx != n_tx) wait_cycles(1);
    checks++;
    if (stalls == 0) begin failures++; $display("stall never seen"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
