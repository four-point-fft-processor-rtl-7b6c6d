// tb_output_mux: random results and selects; the registered output must be
// the selected result one clock later, and zero after reset.
module tb_output_mux;
  import fft4_pkg::*;

  logic       clk = 0, reset = 1;
  cplx_t      X [NPT];
  logic [1:0] sel;
  cplx_t      dout;
  int checks = 0, failures = 0;

  output_mux dut (.clk, .reset, .X, .sel, .dout);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t exp_v;
    sel = 0;
    for (int k = 0; k < NPT; k++) X[k] = '{re: sample_t'(k + 1), im: sample_t'(-k)};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (dout != '0) failures++;
    reset = 0;
    for (int i = 0; i < 300; i++) begin
      for (int k = 0; k < NPT; k++) X[k] = '{re: sample_t'($urandom), im: sample_t'($urandom)};
      sel = 2'($urandom);
      exp_v = X[sel];
      @(posedge clk);
      #1;
      checks++;
      if (dout != exp_v) begin
        failures++;
        $display("mux mismatch sel=%0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
