// fft4_async_top: asynchronous (handshake) four-point FFT processor.
//
// Samples arrive one by one with a four-phase handshake on in_req/in_ack
// (the sample on in_r/in_i must stay valid from in_req rising until in_ack
// rises). A tree of three decimators spreads successive requests over four
// channels, one per sample of a group of four, so each channel runs at a
// quarter of the input rate. The input control logic steers each channel to
// the two linear async blocks that latch that sample's real and imaginary
// parts. When all eight blocks hold data, the AND of their requests asks the
// FFT-4 module to compute; it latches the intermediate and the final values
// in its own handshake stages and acknowledges the input blocks, which are
// then free for the next group. The expander hands the four results out one
// by one through the output control logic on out_req/out_ack (the word on
// out_r/out_i is valid from out_req rising until out_ack rises), and only
// then frees the FFT-4 result.
//
// There is no fixed rate or latency: each stage moves when its neighbours
// are ready, and a slow output stalls the FFT-4 pipeline and then the input.
// In this realisation all handshake controllers sample their inputs on clk
// (reset active high, synchronous); each handshake transition therefore
// takes one clock, and clk only needs to be fast compared to the handshake
// traffic. The gate-level clockless controllers are not reproduced.
module fft4_async_top
  import fft4_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    in_req,   // lreq0: input sample request
  output logic    in_ack,   // la:    input sample acknowledge
  input  sample_t in_r,
  input  sample_t in_i,
  output logic    out_req,  // rr:    output sample request
  input  logic    out_ack,  // rack0: output sample acknowledge
  output sample_t out_r,
  output sample_t out_i
);

  // Decimator tree.
  logic ro0, ri0, ro1, ri1;
  logic r1o0, r1i0, r1o1, r1i1, r2o0, r2i0, r2o1, r2i1;

  decimator u_dec0 (
    .clk, .reset, .li(in_req), .lo(in_ack),
    .ro0(ro0), .ri0(ri0), .ro1(ro1), .ri1(ri1)
  );
  decimator u_dec1 (
    .clk, .reset, .li(ro0), .lo(ri0),
    .ro0(r1o0), .ri0(r1i0), .ro1(r1o1), .ri1(r1i1)
  );
  decimator u_dec2 (
    .clk, .reset, .li(ro1), .lo(ri1),
    .ro0(r2o0), .ri0(r2i0), .ro1(r2o1), .ri1(r2i1)
  );

  // Input latches, real part in even, imaginary part in odd blocks.
  logic [2*NPT-1:0] lab_li, lab_lo, lab_ro, lab_ri;
  sample_t          lab_dout [2*NPT];

  input_ctrl u_in_ctrl (
    .r1o0, .r1i0, .r1o1, .r1i1, .r2o0, .r2i0, .r2o1, .r2i1,
    .lab_li, .lab_lo
  );

  for (genvar g = 0; g < 2*NPT; g++) begin : g_lab
    linear_async_block #(.WIDTH(DW)) u_lab (
      .clk, .reset,
      .li(lab_li[g]), .din((g % 2 == 0) ? in_r : in_i), .lo(lab_lo[g]),
      .dout(lab_dout[g]), .ro0(lab_ro[g]), .ri0(lab_ri[g])
    );
  end

  // Join and FFT-4.
  logic  lreq, lack, rreq, rk;
  cplx_t x [NPT];
  cplx_t X [NPT];

  join_ctrl u_join (.lab_ro, .lab_ri, .lab_dout, .lreq, .lack, .x);

  fft4_async u_fft (
    .clk, .reset, .li(lreq), .din(x), .lo(lack),
    .dout(X), .ro0(rreq), .ri0(rk)
  );

  // Expander and output control logic.
  logic rr, rack0, done;

  expander u_exp (
    .clk, .reset, .ri(rreq), .lo(rk), .ro1(rr), .ri0(rack0), .done
  );

  output_ctrl u_out_ctrl (
    .clk, .reset, .rr, .rack0, .done, .X,
    .out_req, .out_ack, .out_r, .out_i
  );

endmodule
