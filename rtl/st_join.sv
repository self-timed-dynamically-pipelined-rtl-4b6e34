// st_join: self-timed join stage with N_IN input channels.
//
// A join may only produce a valid output once every input channel is valid.
// In the dual-rail circuit this is obtained by building the pull-down network
// from a redundant binary decision diagram in which every path tests every
// input, so the output stays at the invalid code (0,0) until all inputs are
// valid.  At the level modelled here that property is the AND of the input
// completion flags; the stage then behaves as a zdo_stage, and its done flag
// is returned to every predecessor, so all of them precharge together.
// The function of the join (for example an adder) is computed outside and
// presented on in_data.
//
// The join rule follows the original design; the AND of flags in place of
// the transistor network is this design's modelling choice.
module st_join
  import dlms_pkg::*;
#(
  parameter int unsigned  W        = 16,
  parameter int unsigned  N_IN     = 2,
  parameter stage_init_e  INIT     = INIT_BUBBLE,
  parameter logic [W-1:0] INIT_VAL = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [W-1:0]    in_data,
  input  logic [N_IN-1:0] in_ack,     // completion flags of all input channels
  input  logic            succ_done,
  output logic [W-1:0]    out_data,
  output logic            ack,
  output logic            en,
  output logic            done        // to every predecessor
);

  logic all_valid;
  assign all_valid = &in_ack;

  zdo_stage #(.W(W), .INIT(INIT), .INIT_VAL(INIT_VAL)) u_stage (
    .clk, .rst_n, .in_data, .in_ack(all_valid), .succ_done,
    .out_data, .ack, .en, .done
  );

endmodule
