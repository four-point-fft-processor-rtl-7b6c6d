// fft4_top: the synchronous and the asynchronous four-point FFT processors
// side by side. They compute the same transform on separate ports and share
// nothing but clock and reset: sync_* is the clocked version (one sample per
// clock in and out, fixed latency of 10 + 4*BUF_STAGES clocks), async_* the
// handshake version (four-phase request/acknowledge on each side, see
// fft4_async_top). Reset is active high and synchronous.
module fft4_top
  import fft4_pkg::*;
#(
  parameter int unsigned BUF_STAGES = 3
) (
  input  logic    clk,
  input  logic    reset,
  // synchronous processor
  input  sample_t sync_in_r,
  input  sample_t sync_in_i,
  output sample_t sync_out_r,
  output sample_t sync_out_i,
  // asynchronous processor
  input  logic    async_in_req,
  output logic    async_in_ack,
  input  sample_t async_in_r,
  input  sample_t async_in_i,
  output logic    async_out_req,
  input  logic    async_out_ack,
  output sample_t async_out_r,
  output sample_t async_out_i
);

  fft4_sync #(.BUF_STAGES(BUF_STAGES)) u_sync (
    .clk, .reset,
    .in_r(sync_in_r), .in_i(sync_in_i),
    .out_r(sync_out_r), .out_i(sync_out_i)
  );

  fft4_async_top u_async (
    .clk, .reset,
    .in_req(async_in_req), .in_ack(async_in_ack),
    .in_r(async_in_r), .in_i(async_in_i),
    .out_req(async_out_req), .out_ack(async_out_ack),
    .out_r(async_out_r), .out_i(async_out_i)
  );

endmodule
