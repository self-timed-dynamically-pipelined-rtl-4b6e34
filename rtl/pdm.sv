// pdm: pipeline depth modifier.  One self-timed stage (stage B) placed on a
// recursive loop that can remove the token arriving at it or duplicate the
// token passing through it, on request of an external host.
//
// Stage A is the predecessor (its completion flag is ACK_REM), stage C the
// successor (its completion flag is ACK_ADD).  Unlike a zdo_stage, the enable
// of B comes from a C-element: EN_B rises once A holds valid data and C is
// empty, and falls once A has precharged and C holds the datum.  In normal
// mode (req_add = req_rem = 1) B is therefore an ordinary stage with some
// extra forward delay.
//
// Host protocol (both request lines idle at 1):
//   remove: drop req_rem right after a 1->0 edge of ack_rem; raise it again
//           right after the next 1->0 edge.  The next token that reaches A
//           sets REM/REQ: EN_B is held at 0 and A is forced to precharge, so
//           that token disappears between A and B.
//   add:    drop req_add right after a 1->0 edge of ack_add; raise it again
//           right after the next 1->0 edge.  The next token is kept in B
//           after C has taken it (the C-element is not allowed to reset),
//           so once C has passed it on and become empty, C takes the same
//           datum a second time: one token more.
//
// The outputs ack_rem and ack_add are simply ACK_A and ACK_C, brought out
// for the host, which watches their 1->0 edges as the original design
// describes.  The REM/REQ signal is produced here from registered signals, which
// replaces the keeper of the transistor-level generator.
//
// The EN_B, REM and host-protocol rules follow the original design as
// described in words; gating B's valid flag with EN_B is this design's
// addition for the cycle-level model.
module pdm
  import dlms_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,    // function block output of stage B
  input  logic         in_ack,     // completion flag of stage A
  output logic         done,       // to stage A: precharge it
  output logic [W-1:0] out_data,
  output logic         ack,        // completion flag of stage B
  input  logic         succ_ack,   // completion flag of stage C
  output logic         en,         // EN_B
  input  logic         req_add,
  input  logic         req_rem,
  output logic         ack_add,
  output logic         ack_rem,
  output logic         rem         // REM / REQ of the removal circuit
);

  logic x, y;

  assign ack_rem = in_ack;
  assign ack_add = succ_ack;

  // Removal request: a token waits in A, B has not started on it, and the
  // host has armed a removal.
  assign rem = in_ack && !req_rem && !en;

  // C-element inputs: set needs A valid and C empty; reset needs A empty and
  // C valid, and is blocked while an addition is armed.
  assign x = in_ack && !rem;
  assign y = !succ_ack || !req_add;

  c_element #(.RST_VAL(1'b0)) u_c (.clk, .rst_n, .x, .y, .z(en));

  // B's completion flag is withdrawn as soon as EN_B falls: C may already be
  // empty again at that point and must not take the same datum twice.
  logic ack_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q    <= 1'b0;
      out_data <= '0;
    end else if (!en) begin
      ack_q <= 1'b0;
    end else if (!ack_q && in_ack) begin
      ack_q    <= 1'b1;
      out_data <= in_data;
    end
  end

  assign ack  = ack_q && en;
  assign done = ack || rem;

endmodule
