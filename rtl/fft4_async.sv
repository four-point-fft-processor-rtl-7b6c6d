// fft4_async: FFT-4 module of the asynchronous processor.
//
// Two add/subtract stages (fft4_stage1, fft4_stage2) separated by handshake
// latches: one linear async block holds the intermediate values a, b, c, d
// (four complex values at 20 bits per part) and a second holds the final
// X(0..3) (16 bits per part). The stages form a two-deep handshake pipeline:
// li/lo is the handshake with the input side, ro0/ri0 the one with the
// expander, and dout holds the transform while ro0 is high. The
// intermediate block can take the next group while the final block still
// waits for the expander.
module fft4_async
  import fft4_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  li,
  input  cplx_t din  [NPT],
  output logic  lo,
  output cplx_t dout [NPT],
  output logic  ro0,
  input  logic  ri0
);

  localparam int unsigned W1 = NPT * $bits(cplx_w_t);
  localparam int unsigned W2 = NPT * $bits(cplx_t);

  cplx_w_t s1_d [NPT];
  cplx_w_t s1_q [NPT];
  cplx_t   s2_d [NPT];
  logic [W1-1:0] s1_d_bus, s1_q_bus;
  logic [W2-1:0] s2_d_bus, s2_q_bus;
  logic mid_req, mid_ack;

  fft4_stage1 u_stage1 (.x(din),  .s(s1_d));
  fft4_stage2 u_stage2 (.s(s1_q), .X(s2_d));

  // The handshake latches store the values as flat buses.
  for (genvar k = 0; k < NPT; k++) begin : g_pack
    assign s1_d_bus[k*$bits(cplx_w_t) +: $bits(cplx_w_t)] = s1_d[k];
    assign s1_q[k] = s1_q_bus[k*$bits(cplx_w_t) +: $bits(cplx_w_t)];
    assign s2_d_bus[k*$bits(cplx_t) +: $bits(cplx_t)] = s2_d[k];
    assign dout[k] = s2_q_bus[k*$bits(cplx_t) +: $bits(cplx_t)];
  end

  linear_async_block #(.WIDTH(W1)) u_lab_mid (
    .clk, .reset,
    .li(li), .din(s1_d_bus), .lo(lo),
    .dout(s1_q_bus), .ro0(mid_req), .ri0(mid_ack)
  );

  linear_async_block #(.WIDTH(W2)) u_lab_out (
    .clk, .reset,
    .li(mid_req), .din(s2_d_bus), .lo(mid_ack),
    .dout(s2_q_bus), .ro0(ro0), .ri0(ri0)
  );

endmodule
