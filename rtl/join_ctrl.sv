// join_ctrl: control logic between the input linear async blocks and the
// FFT-4 module of the asynchronous processor.
//
// The request to the FFT-4 module is the AND of the right-hand requests of
// all eight input blocks, so it rises only when all four samples (real and
// imaginary parts) have been latched. The FFT-4 module's acknowledge is
// returned to all eight blocks. The data of the eight blocks are gathered
// into the four complex samples the FFT-4 module reads (block 2k is the
// real, 2k+1 the imaginary part of x(k)). Combinational.
module join_ctrl
  import fft4_pkg::*;
(
  input  logic [2*NPT-1:0] lab_ro,           // requests from the blocks
  output logic [2*NPT-1:0] lab_ri,           // acknowledges to the blocks
  input  sample_t          lab_dout [2*NPT], // data of the blocks
  output logic             lreq,             // request to the FFT-4 module
  input  logic             lack,             // its acknowledge
  output cplx_t            x [NPT]           // samples to the FFT-4 module
);

  assign lreq   = &lab_ro;
  assign lab_ri = {(2*NPT){lack}};

  always_comb begin
    for (int k = 0; k < NPT; k++) x[k] = '{re: lab_dout[2*k], im: lab_dout[2*k+1]};
  end

endmodule
