// pdm_host: host side of the four-wire handshake of one pipeline depth
// modifier.
//
// A command (add or remove, one-cycle pulse, taken only when idle) is carried
// out exactly as the modifier expects it: wait for a 1->0 edge of the
// matching acknowledge (ack_add or ack_rem), drop the matching request, wait
// for the next 1->0 edge, raise the request again and pulse `finished`.  The
// requests idle at 1 (normal mode).  Edges are taken against the previous
// cycle, so each request changes one cycle after the edge it answers.
//
// The timing of the request lines relative to the acknowledge edges follows
// the original protocol; the state machine is this design's own.
module pdm_host (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_add,
  input  logic cmd_rem,
  input  logic ack_add,
  input  logic ack_rem,
  output logic req_add,
  output logic req_rem,
  output logic busy,
  output logic finished
);

  typedef enum logic [1:0] {IDLE, ARM, HOLD} host_state_e;

  host_state_e state;
  logic        is_add;       // command in progress is an addition
  logic        add_prev, rem_prev;
  logic        fall;

  assign fall = is_add ? (add_prev && !ack_add) : (rem_prev && !ack_rem);
  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      is_add   <= 1'b0;
      add_prev <= 1'b0;
      rem_prev <= 1'b0;
      req_add  <= 1'b1;
      req_rem  <= 1'b1;
      finished <= 1'b0;
    end else begin
      add_prev <= ack_add;
      rem_prev <= ack_rem;
      finished <= 1'b0;
      unique case (state)
        IDLE: begin
          if (cmd_add) begin
            is_add <= 1'b1;
            state  <= ARM;
          end else if (cmd_rem) begin
            is_add <= 1'b0;
            state  <= ARM;
          end
        end
        ARM: if (fall) begin
          if (is_add) req_add <= 1'b0;
          else        req_rem <= 1'b0;
          state <= HOLD;
        end
        HOLD: if (fall) begin
          req_add  <= 1'b1;
          req_rem  <= 1'b1;
          finished <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
