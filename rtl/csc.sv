// csc: clock strobe circuit.  Merges N acknowledge pulses into one.
//
// Each input is the handshake flag of one output channel of a fork.  A rising
// edge on an input sets that input's latch; the strobe is 1 while every input
// has either been latched or is rising now, i.e. once every channel has
// acknowledged the current token, whatever the order and spacing of the
// pulses.  This is the pulse-combining behaviour of the IPCMOS strobe circuit;
// its transistor-level latch-and-switch structure is not modelled.  The
// latches are cleared by `rearm`, which the owner raises once the token is
// gone (the owning stage has precharged).  Input edges are taken against the
// previous cycle; the edge memory resets to 1, so an input that is already
// high after reset is not taken for a new acknowledge.
//
// The merging of the acknowledges before the fork precharges follows the
// original design; the edge-latch implementation is this design's own.
module csc #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ack_in,
  input  logic         rearm,
  output logic [N-1:0] seen,    // per-input: already acknowledged
  output logic         strobe
);

  logic [N-1:0] ack_prev;
  logic [N-1:0] rise;

  assign rise   = ack_in & ~ack_prev;
  assign strobe = &(seen | rise);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_prev <= '1;
      seen     <= '0;
    end else begin
      ack_prev <= ack_in;
      if (rearm) seen <= '0;
      else       seen <= seen | rise;
    end
  end

endmodule
