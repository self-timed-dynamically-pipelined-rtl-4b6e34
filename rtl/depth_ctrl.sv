// depth_ctrl: keeps the pipeline depth of the adaptation loops at a target.
//
// `depth` counts the tokens added to the adaptation loops beyond the one
// token every coefficient register holds; it is the delay D of the delayed
// LMS update.  Whenever depth differs from target (clamped to MAX_DEPTH) and
// no change is in progress, one token is added to or removed from both the
// loops and the input buffer chain at the same time, through one pdm_host
// per depth modifier.  depth moves by one when both modifiers have finished;
// a new step starts after that.  The policy that chooses the target (data
// rate, training or tracking mode, error magnitude) is left to the user.
//
// The request/acknowledge sequence and driving both modifiers together follow
// the original design; the one-step-at-a-time controller, the depth counter
// and the MAX_DEPTH clamp (7, the deepest setting evaluated) are this
// design's own.
module depth_ctrl #(
  parameter int unsigned DW        = 4,
  parameter int unsigned MAX_DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] target,
  output logic [DW-1:0] depth,
  output logic          busy,
  // loop modifier
  input  logic          l_ack_add,
  input  logic          l_ack_rem,
  output logic          l_req_add,
  output logic          l_req_rem,
  // buffer-chain modifier
  input  logic          s_ack_add,
  input  logic          s_ack_rem,
  output logic          s_req_add,
  output logic          s_req_rem
);

  logic [DW-1:0] tgt;
  logic          cmd_add, cmd_rem, step_up;
  logic          l_busy, s_busy, l_fin, s_fin, l_done, s_done;

  assign tgt     = (target > DW'(MAX_DEPTH)) ? DW'(MAX_DEPTH) : target;
  assign cmd_add = !busy && (tgt > depth);
  assign cmd_rem = !busy && (tgt < depth);

  pdm_host u_lh (.clk, .rst_n, .cmd_add, .cmd_rem, .ack_add(l_ack_add),
                 .ack_rem(l_ack_rem), .req_add(l_req_add), .req_rem(l_req_rem),
                 .busy(l_busy), .finished(l_fin));
  pdm_host u_sh (.clk, .rst_n, .cmd_add, .cmd_rem, .ack_add(s_ack_add),
                 .ack_rem(s_ack_rem), .req_add(s_req_add), .req_rem(s_req_rem),
                 .busy(s_busy), .finished(s_fin));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      step_up <= 1'b0;
      l_done  <= 1'b0;
      s_done  <= 1'b0;
      depth   <= '0;
    end else if (!busy) begin
      if (cmd_add || cmd_rem) begin
        busy    <= 1'b1;
        step_up <= cmd_add;
        l_done  <= 1'b0;
        s_done  <= 1'b0;
      end
    end else begin
      if (l_fin) l_done <= 1'b1;
      if (s_fin) s_done <= 1'b1;
      if ((l_done || l_fin) && (s_done || s_fin) && !l_busy && !s_busy) begin
        busy  <= 1'b0;
        depth <= step_up ? depth + 1'b1 : depth - 1'b1;
      end
    end
  end

endmodule
