// output_mux: the output multiplexer of the synchronous FFT-4 processor.
//
// It turns the four parallel FFT results back into a serial stream: each
// clock it registers X[sel], where sel is the 2-bit counter value (00 ->
// X(0), 01 -> X(1), 10 -> X(2), 11 -> X(3)). The output register is this
// design's choice; it gives the stream one clock of latency after the
// multiplexer. Synchronous, active-high reset clears the output.
module output_mux
  import fft4_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  cplx_t      X [NPT],
  input  logic [1:0] sel,
  output cplx_t      dout
);

  always_ff @(posedge clk) begin
    if (reset) dout <= '0;
    else       dout <= X[sel];
  end

endmodule
