// expander: turns one FFT-4 result request into four serial output
// handshakes, the reverse of the decimator pair on the input side.
//
// When the FFT-4 module requests (ri high) the expander raises ro1, the
// request for one output word, and completes a four-phase handshake with
// the output control logic on ro1/ri0. It repeats this until the control
// logic reports, by done, that the fourth word has been acknowledged; only
// then does it acknowledge the FFT-4 module on lo, which frees the FFT-4
// result register. lo falls after ri falls, and the expander is idle again.
// So the four results leave one by one at the pace of the output side,
// while the FFT-4 computation ran once for all four.
//
// Ports follow the published block (ri, done, lo, ro1, ri0). The state
// sequence is this design's choice, as is the clocked realisation: the
// handshake wires are sampled on clk and outputs come from flip-flops.
// done is examined only after a word's handshake has returned to zero.
module expander (
  input  logic clk,
  input  logic reset,
  input  logic ri,    // request from the FFT-4 module
  output logic lo,    // acknowledge to the FFT-4 module
  output logic ro1,   // output word request (rr)
  input  logic ri0,   // output word acknowledge (rack0)
  input  logic done   // all four words delivered
);

  typedef enum logic [1:0] {IDLE, REQ, RTZ, ACK} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= IDLE;
      lo    <= 1'b0;
      ro1   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (ri && !ri0) begin ro1 <= 1'b1; state <= REQ; end
        REQ:  if (ri0)        begin ro1 <= 1'b0; state <= RTZ; end
        RTZ:  if (!ri0) begin
                if (done) begin lo  <= 1'b1; state <= ACK; end
                else      begin ro1 <= 1'b1; state <= REQ; end
              end
        ACK:  if (!ri)        begin lo  <= 1'b0; state <= IDLE; end
        default:              state <= IDLE;
      endcase
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (reset) ro1 && !ri0 |=> ro1);

endmodule
