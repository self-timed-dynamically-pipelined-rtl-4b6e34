// tr_buffer: two-stage self-timed buffer (the TR element, and the SR element
// of the buffer chain).
//
// Two zdo_stages in a row, each an identity function block (a dual-rail
// inverter pair in the circuit).  With HOLD_TOKEN = 1 the pair comes out of
// reset holding one token: the first stage is a spacer and the second holds
// INIT_VAL.  On a loop this acts as the register of a synchronous design; on
// a delay line it delays the stream by one datum.  With HOLD_TOKEN = 0 both
// stages start as bubbles and the element is a plain two-slot buffer.
// first_ack exposes the completion flag of the first stage, for a pipeline
// depth modifier placed in front of the element.
//
// The two-stage element and its initial token follow the original design;
// INIT_VAL is this design's addition.
module tr_buffer
  import dlms_pkg::*;
#(
  parameter int unsigned  W          = 16,
  parameter bit           HOLD_TOKEN = 1'b1,
  parameter logic [W-1:0] INIT_VAL   = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_ack,
  output logic         done,
  output logic [W-1:0] out_data,
  output logic         out_ack,
  input  logic         succ_done,
  output logic         first_ack
);

  localparam stage_init_e INIT0 = HOLD_TOKEN ? INIT_SPACER : INIT_BUBBLE;
  localparam stage_init_e INIT1 = HOLD_TOKEN ? INIT_DATA   : INIT_BUBBLE;

  logic [W-1:0] d0;
  logic         en0, en1, done1;

  zdo_stage #(.W(W), .INIT(INIT0), .INIT_VAL(INIT_VAL)) u_s0 (
    .clk, .rst_n, .in_data, .in_ack, .succ_done(done1),
    .out_data(d0), .ack(first_ack), .en(en0), .done
  );

  zdo_stage #(.W(W), .INIT(INIT1), .INIT_VAL(INIT_VAL)) u_s1 (
    .clk, .rst_n, .in_data(d0), .in_ack(first_ack), .succ_done,
    .out_data, .ack(out_ack), .en(en1), .done(done1)
  );

endmodule
