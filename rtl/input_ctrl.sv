// input_ctrl: control logic between the decimator tree and the eight input
// linear async blocks of the asynchronous FFT-4 processor.
//
// The decimator tree spreads four successive input requests over four
// channels: sample x(0) goes to r1o0, x(1) to r2o0, x(2) to r1o1 and x(3)
// to r2o1 (first-level ro0 feeds decimator 1, ro1 feeds decimator 2). Each
// channel's request is sent to the pair of linear async blocks that latch
// that sample's real and imaginary parts (block 2k real, 2k+1 imaginary for
// x(k)), and the channel is acknowledged when both blocks of the pair have
// acknowledged. The channel-to-sample order and the AND of the pair's
// acknowledges are this design's choices. Combinational.
module input_ctrl
  import fft4_pkg::*;
(
  input  logic             r1o0,  // decimator 1, channel 0 request
  output logic             r1i0,  // decimator 1, channel 0 acknowledge
  input  logic             r1o1,
  output logic             r1i1,
  input  logic             r2o0,  // decimator 2, channel 0 request
  output logic             r2i0,
  input  logic             r2o1,
  output logic             r2i1,
  output logic [2*NPT-1:0] lab_li, // requests to the linear async blocks
  input  logic [2*NPT-1:0] lab_lo  // acknowledges from them
);

  logic [NPT-1:0] req;  // request per sample index
  logic [NPT-1:0] ack;  // acknowledge per sample index

  assign req = {r2o1, r1o1, r2o0, r1o0};

  always_comb begin
    for (int k = 0; k < NPT; k++) begin
      lab_li[2*k]   = req[k];
      lab_li[2*k+1] = req[k];
      ack[k]        = lab_lo[2*k] && lab_lo[2*k+1];
    end
  end

  assign r1i0 = ack[0];
  assign r2i0 = ack[1];
  assign r1i1 = ack[2];
  assign r2i1 = ack[3];

endmodule
