// tb_div4_counter: checks the count sequence 3,0,1,2,3,... after reset and
// that the enable is high exactly in one cycle of four (count 3).
module tb_div4_counter;
  logic       clk = 0, reset = 1;
  logic [1:0] cnt;
  logic       en_div4;
  int checks = 0, failures = 0, en_count = 0;

  div4_counter dut (.clk, .reset, .cnt, .en_div4);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (cnt != 2'((i + 3) % 4)) begin
        failures++;
        $display("cycle %0d cnt=%0d", i, cnt);
      end
      checks++;
      if (en_div4 != (((i + 3) % 4) == 3)) failures++;
      if (en_div4) en_count++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (en_count != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
