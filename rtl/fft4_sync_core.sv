// fft4_sync_core: the clocked FFT-4 module of the synchronous processor.
//
// It computes the four-point FFT of x[0..3] with the two add/subtract stages
// (fft4_stage1, fft4_stage2). All its registers update only when en is high,
// i.e. at a quarter of the clock rate: the stage-1 register (a, b, c, d at
// 20 bits), the stage-2 register (X(0..3), truncated to 16 bits) and then
// BUF_STAGES further buffer registers on the result. The buffer registers
// carry no logic; they are there so that a synthesis tool can retime the
// adders across them. Latency from x sampled to X valid is
// (2 + BUF_STAGES) enable pulses. The default of 3 buffer stages is this
// design's choice, made so that the whole processor has an input-to-output
// latency of 22 clocks (2 + 0 stages would give 10 clocks).
module fft4_sync_core
  import fft4_pkg::*;
#(
  parameter int unsigned BUF_STAGES = 3
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  en,
  input  cplx_t x [NPT],
  output cplx_t X [NPT]
);

  cplx_w_t s1_d [NPT];
  cplx_w_t s1_q [NPT];
  cplx_t   s2_d [NPT];
  cplx_t   pipe [BUF_STAGES+1][NPT];

  fft4_stage1 u_stage1 (.x(x),    .s(s1_d));
  fft4_stage2 u_stage2 (.s(s1_q), .X(s2_d));

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < NPT; k++) s1_q[k] <= '0;
      for (int p = 0; p <= BUF_STAGES; p++)
        for (int k = 0; k < NPT; k++) pipe[p][k] <= '0;
    end else if (en) begin
      s1_q    <= s1_d;
      pipe[0] <= s2_d;
      for (int p = 1; p <= BUF_STAGES; p++) pipe[p] <= pipe[p-1];
    end
  end

  assign X = pipe[BUF_STAGES];

endmodule
