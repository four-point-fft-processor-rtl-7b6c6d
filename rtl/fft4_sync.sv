// fft4_sync: synchronous four-point FFT processor.
//
// A serial stream of complex samples (in_r, in_i, one per clock) is cut into
// consecutive groups of four. The first sample after reset is x(0) of the
// first group. Four shift registers gather a group; a 2-bit counter marks
// every fourth clock, on which the FFT-4 module takes the group and starts
// its pipeline of quarter-rate registers. The four results are sent out
// serially, X(0) first, through a multiplexer driven by the same counter, so
// the output stream (out_r, out_i) runs at the input rate.
//
// Timing: the transform of a group comes out at a fixed latency of
// LATENCY = 10 + 4*BUF_STAGES clocks (22 with the default), counted from
// the clock in which x(0) is on the input to the clock in which X(0) is on
// the output; X(1..3) follow on the next three clocks. Active-high
// synchronous reset. The latency split into quarter-rate buffer registers
// and one output register is this design's choice.
module fft4_sync
  import fft4_pkg::*;
#(
  parameter int unsigned BUF_STAGES = 3
) (
  input  logic    clk,
  input  logic    reset,
  input  sample_t in_r,
  input  sample_t in_i,
  output sample_t out_r,
  output sample_t out_i
);

  cplx_t      x    [NPT];
  cplx_t      X    [NPT];
  cplx_t      din;
  cplx_t      dout;
  logic [1:0] cnt;
  logic       en_div4;

  assign din = '{re: in_r, im: in_i};

  sync_input_sr u_in (.clk, .reset, .din, .x);

  div4_counter u_cnt (.clk, .reset, .cnt, .en_div4);

  fft4_sync_core #(.BUF_STAGES(BUF_STAGES)) u_fft (
    .clk, .reset, .en(en_div4), .x, .X
  );

  output_mux u_mux (.clk, .reset, .X, .sel(cnt), .dout);

  assign out_r = dout.re;
  assign out_i = dout.im;

endmodule
