// div4_counter: the 2-bit counter of the synchronous FFT-4 processor.
//
// It counts clock cycles modulo 4. Its value selects which of the four FFT
// results the output multiplexer passes, and it divides the clock by four
// for the FFT-4 module. Rather than using a counter bit as a second clock,
// this design gives the FFT-4 registers a clock enable, en_div4, that is
// high in one cycle of every four (when the count is 3); the effect is a
// quarter-rate update of the FFT-4 registers within a single clock domain.
// Reset loads 3, so the first sample after reset starts a group of four.
module div4_counter (
  input  logic       clk,
  input  logic       reset,
  output logic [1:0] cnt,
  output logic       en_div4
);

  always_ff @(posedge clk) begin
    if (reset) cnt <= 2'd3;
    else       cnt <= cnt + 2'd1;
  end

  assign en_div4 = (cnt == 2'd3);

endmodule
