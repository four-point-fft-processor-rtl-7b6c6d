// decimator: four-phase handshake splitter that halves the request rate.
//
// Successive requests on the left (li) are steered alternately to the two
// right-hand channels, ro0 then ro1, so each channel sees every second
// request. The controller follows a six-state burst-mode specification
// (state: input burst -> output burst):
//   1: li+          -> ro0+
//   2: ri0+         -> ro0-, lo+
//   3: li-, ri0-    -> lo-
//   4: li+          -> ro1+
//   5: ri1+         -> ro1-, lo+
//   0: li-, ri1-    -> lo-      (then back to 1)
// A state waits until every transition of its input burst has happened, in
// any order. Two decimators in series give a one-in-four rate.
//
// The state table and port names are those of the published controller.
// The gate-level clockless realisation of it is not reproduced: here the
// controller is a state machine that samples the handshake wires on clk and
// drives its outputs from flip-flops, so every output transition happens one
// clock after the input burst completes. Reset (active high, synchronous)
// enters state 1 with all outputs low.
module decimator (
  input  logic clk,
  input  logic reset,
  input  logic li,   // left request
  output logic lo,   // left acknowledge
  output logic ro0,  // request to channel 0
  input  logic ri0,  // acknowledge from channel 0
  output logic ro1,  // request to channel 1
  input  logic ri1   // acknowledge from channel 1
);

  typedef enum logic [2:0] {
    S0 = 3'd0, S1 = 3'd1, S2 = 3'd2, S3 = 3'd3, S4 = 3'd4, S5 = 3'd5
  } state_t;

  state_t state;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S1;
      lo    <= 1'b0;
      ro0   <= 1'b0;
      ro1   <= 1'b0;
    end else begin
      unique case (state)
        S1: if (li)          begin ro0 <= 1'b1;               state <= S2; end
        S2: if (ri0)         begin ro0 <= 1'b0; lo <= 1'b1;   state <= S3; end
        S3: if (!li && !ri0) begin lo  <= 1'b0;               state <= S4; end
        S4: if (li)          begin ro1 <= 1'b1;               state <= S5; end
        S5: if (ri1)         begin ro1 <= 1'b0; lo <= 1'b1;   state <= S0; end
        S0: if (!li && !ri1) begin lo  <= 1'b0;               state <= S1; end
        default:             state <= S1;
      endcase
    end
  end

  // The two right-hand channels are never requested at the same time.
  a_one_channel: assert property (@(posedge clk) disable iff (reset) !(ro0 && ro1));

endmodule
