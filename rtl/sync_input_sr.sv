// sync_input_sr: the four input registers of the synchronous FFT-4 processor.
//
// Each clock the incoming 32-bit sample (16-bit real, 16-bit imaginary) is
// written into register 3 and every register passes its value one place
// down (3 -> 2 -> 1 -> 0). Three clocks after a sample enters it reaches
// register 0, so once four samples have arrived x[0] holds the oldest and
// x[3] the newest: the four registers are the parallel view of one group of
// four serial samples. Synchronous, active-high reset clears all registers.
module sync_input_sr
  import fft4_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  cplx_t din,
  output cplx_t x [NPT]
);

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < NPT; k++) x[k] <= '0;
    end else begin
      x[NPT-1] <= din;
      for (int k = 0; k < NPT - 1; k++) x[k] <= x[k+1];
    end
  end

endmodule
