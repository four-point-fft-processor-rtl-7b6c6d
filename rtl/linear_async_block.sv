// linear_async_block: handshake-controlled data latch (one pipeline stage).
//
// When a request arrives on the left (li high) and the stage is empty, it
// captures din into dout, acknowledges the left side (lo) and requests the
// right side (ro0). The two sides then complete their four-phase
// handshakes independently: lo falls after li falls, and ro0 falls once
// the right side acknowledges (ri0 high). A new word is accepted only when
// both handshakes are back to zero (li high while lo, ro0 and ri0 are low),
// so dout is held until the next stage has taken it: a full stage stalls its
// left side. Several stages in series form a pipeline.
//
// Ports follow the published block (li, din, lo, dout, ro0, ri0). The
// gate-level clockless controller is not reproduced: this version samples
// the handshake wires on clk and reacts one clock later. WIDTH defaults to
// 20 bits, the width of the data bus shown for the block; the processor
// instantiates it at 16 bits for input samples and wider inside the FFT-4
// module. Reset (active high, synchronous) empties the stage and clears
// dout.
module linear_async_block #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             li,    // left request
  input  logic [WIDTH-1:0] din,
  output logic             lo,    // left acknowledge
  output logic [WIDTH-1:0] dout,
  output logic             ro0,   // right request
  input  logic             ri0    // right acknowledge
);

  logic accept;
  assign accept = li && !lo && !ro0 && !ri0;

  always_ff @(posedge clk) begin
    if (reset) begin
      lo   <= 1'b0;
      ro0  <= 1'b0;
      dout <= '0;
    end else begin
      if (accept) begin
        dout <= din;
        lo   <= 1'b1;
        ro0  <= 1'b1;
      end else begin
        if (lo && !li)  lo  <= 1'b0;
        if (ro0 && ri0) ro0 <= 1'b0;
      end
    end
  end

  // Four-phase rules on the right side: a request is held, with its data
  // unchanged, until it is acknowledged.
  a_req_held:  assert property (@(posedge clk) disable iff (reset) ro0 && !ri0 |=> ro0);
  a_data_held: assert property (@(posedge clk) disable iff (reset) ro0 |=> $stable(dout));

endmodule
