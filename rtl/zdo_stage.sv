// zdo_stage: one zero-delay-overhead self-timed pipeline stage, modelled
// cycle by cycle.
//
// The stage is a function block (computed outside, presented on in_data) with
// a completion flag.  Each clock cycle stands for one gate-level evaluation
// step of the self-timed circuit, so the handshake below runs with unit delays:
//   * ack (ACK_n, the completion detector) rises when the stage is enabled and
//     its predecessor's output is valid; the result of the function block is
//     captured at the same time.  It stays 1 until the stage is precharged.
//     It does not evaluate while succ_done is 1: EN is falling then, and
//     evaluating would leave a datum in a stage that is about to precharge.
//   * en (EN_n) falls, and the stage precharges (ack falls one step later),
//     once the successor holds valid data while enabled (succ_done = EN_{n+1}
//     and ACK_{n+1} both 1); en rises again as soon as that is no longer so.
//   * done = en & ack is what this stage sends back to its predecessor.
// A stage therefore starts evaluating as soon as a datum arrives (no
// handshake delay on the forward path); a datum that moves on leaves a
// precharged stage (spacer) behind it, and the spacer turns into a free
// bubble when the successor precharges.  The three states of the text
// (data, spacer, bubble) are (en,ack) = (1,1), (0,0) and (1,0).
// The dual-rail dynamic logic itself is not modelled: a precharged stage is
// shown by ack = 0 and the data bits keep their last value.
//
// INIT selects the state after reset (a token is a DATA stage whose
// predecessor is a SPACER).  Reset is active low and synchronous; it is this
// design's choice, since the initial state of each stage is only described as
// "initialised".
module zdo_stage
  import dlms_pkg::*;
#(
  parameter int unsigned  W        = 16,
  parameter stage_init_e  INIT     = INIT_BUBBLE,
  parameter logic [W-1:0] INIT_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,    // output of this stage's function block
  input  logic         in_ack,     // predecessor output valid (ACK_{n-1})
  input  logic         succ_done,  // successor enabled and holding valid data
  output logic [W-1:0] out_data,
  output logic         ack,        // ACK_n: output valid
  output logic         en,         // EN_n: 1 = evaluate, 0 = precharge
  output logic         done        // en & ack, to the predecessor
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en       <= (INIT != INIT_SPACER);
      ack      <= (INIT == INIT_DATA);
      out_data <= INIT_VAL;
    end else begin
      en <= !succ_done;
      if (!en) begin
        ack <= 1'b0;                       // precharge
      end else if (!ack && in_ack && !succ_done) begin
        ack      <= 1'b1;                  // evaluate
        out_data <= in_data;
      end
    end
  end

  assign done = en & ack;

endmodule
