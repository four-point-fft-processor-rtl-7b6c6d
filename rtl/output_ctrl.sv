// output_ctrl: control logic at the output of the asynchronous processor.
//
// It connects the expander's word handshake (rr/rack0) to the outside
// (out_req/out_ack) and puts the right FFT result on out_r/out_i: a 2-bit
// index selects X(index) from the FFT-4 result, starting at X(0). The
// index advances when out_ack rises, so the word is valid from out_req
// rising to out_ack rising. When the acknowledge of X(3) rises, done is
// set, telling the expander the group is finished; done is cleared when
// the first request of the next group rises. The index/done scheme is this
// design's choice. Reset (active high, synchronous) clears index and done.
module output_ctrl
  import fft4_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    rr,         // word request from the expander
  output logic    rack0,      // word acknowledge to the expander
  output logic    done,       // fourth word acknowledged
  input  cplx_t   X [NPT],    // FFT-4 result (held while it is requested)
  output logic    out_req,
  input  logic    out_ack,
  output sample_t out_r,
  output sample_t out_i
);

  logic [1:0] idx;
  logic       ack_q, rr_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      idx   <= '0;
      done  <= 1'b0;
      ack_q <= 1'b0;
      rr_q  <= 1'b0;
    end else begin
      ack_q <= out_ack;
      rr_q  <= rr;
      if (rr && !rr_q) done <= 1'b0;
      if (out_ack && !ack_q) begin
        idx <= idx + 2'd1;
        if (idx == 2'(NPT - 1)) done <= 1'b1;
      end
    end
  end

  assign out_req = rr;
  assign rack0   = out_ack;
  assign out_r   = X[idx].re;
  assign out_i   = X[idx].im;

endmodule
