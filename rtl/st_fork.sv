// st_fork: self-timed fork stage with one input channel and N_OUT output
// channels.
//
// The stage evaluates like a zdo_stage, but it must keep its token until every
// output channel has taken it, and a channel that has already taken the token
// must not take it a second time while a slower channel is still stalled.  A
// clock strobe circuit (csc) collects the acknowledge of each channel (the
// done flag of the stage that follows on that channel); once all have come,
// the strobe precharges the fork.  The per-channel latches of the strobe
// circuit also withdraw the valid flag from a channel that has already been
// served, which keeps its acknowledge persistent until the fork precharges.
//
// Timing: the token is offered to all channels in the cycle after the fork
// evaluates; the fork precharges the cycle after the last channel took it and
// is ready for a new token two cycles later.
module st_fork
  import dlms_pkg::*;
#(
  parameter int unsigned  W        = 16,
  parameter int unsigned  N_OUT    = 2,
  parameter stage_init_e  INIT     = INIT_BUBBLE,
  parameter logic [W-1:0] INIT_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     in_data,
  input  logic             in_ack,
  output logic             done,       // to the predecessor
  output logic [W-1:0]     out_data,   // same datum on every channel
  output logic [N_OUT-1:0] out_ack,    // valid flag per channel
  input  logic [N_OUT-1:0] succ_done,  // done flag of each channel's next stage
  output logic             ack,        // raw completion flag of the fork stage
  output logic             en
);

  logic             strobe;
  logic [N_OUT-1:0] seen;

  csc #(.N(N_OUT)) u_csc (
    .clk, .rst_n, .ack_in(succ_done), .rearm(!ack), .seen, .strobe
  );

  zdo_stage #(.W(W), .INIT(INIT), .INIT_VAL(INIT_VAL)) u_stage (
    .clk, .rst_n, .in_data, .in_ack, .succ_done(strobe),
    .out_data, .ack, .en, .done
  );

  assign out_ack = {N_OUT{ack}} & ~seen;

endmodule
