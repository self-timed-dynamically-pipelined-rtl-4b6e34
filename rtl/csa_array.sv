// csa_array: fine-grain self-timed multi-operand adder that sums the N_IN tap
// products into the filter output.
//
// A carry-save adder array folds the operands one by one into a sum/carry
// word pair; a carry-ripple adder merges the pair at the end.  Everything is
// W bits wide and wraps modulo 2^W (16-bit intermediate results).  The array
// is cut into NST self-timed stages: stage 0 joins all N_IN input channels,
// stages 0..NST-2 each fold their share of the operands (operand k goes to
// stage k*(NST-1)/N_IN), and stage NST-1 is the ripple adder.  The operands
// travel with the partial result.  NST = 6 is within the 6 to 8 stages used
// for the array; the cut points are this design's choice.
module csa_array
  import dlms_pkg::*;
#(
  parameter int unsigned N_IN = TAPS,
  parameter int unsigned W    = ACC_W,
  parameter int unsigned NST  = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_IN*W-1:0]   ops,        // operand k in bits [k*W +: W]
  input  logic [N_IN-1:0]     ops_ack,
  output logic                ops_done,   // to every operand channel
  output logic [W-1:0]        sum,
  output logic                sum_ack,
  input  logic                succ_done
);

  typedef struct packed {
    logic [N_IN*W-1:0] ops;
    logic [W-1:0]      s;
    logic [W-1:0]      c;
  } ast_t;

  localparam int unsigned DW = $bits(ast_t);

  function automatic ast_t stage_fn(input int k, input ast_t x);
    ast_t o;
    logic [W-1:0] r, s2, c2;
    o = x;
    if (k == int'(NST) - 1) begin
      o.s = x.s + x.c;
      o.c = '0;
    end else begin
      for (int i = 0; i < int'(N_IN); i++) begin
        if ((i * (int'(NST) - 1)) / int'(N_IN) == k) begin
          r   = o.ops[i*W +: W];
          s2  = o.s ^ o.c ^ r;
          c2  = ((o.s & o.c) | (o.s & r) | (o.c & r)) << 1;
          o.s = s2;
          o.c = c2;
        end
      end
    end
    return o;
  endfunction

  logic [DW-1:0] sd   [NST];
  logic          sack [NST];
  logic          sen  [NST];
  logic          sdn  [NST];

  ast_t first_in;
  assign first_in = stage_fn(0, ast_t'{ops: ops, s: '0, c: '0});

  st_join #(.W(DW), .N_IN(N_IN)) u_s0 (
    .clk, .rst_n, .in_data(first_in), .in_ack(ops_ack),
    .succ_done((NST > 1) ? sdn[1 % NST] : succ_done),
    .out_data(sd[0]), .ack(sack[0]), .en(sen[0]), .done(sdn[0])
  );
  assign ops_done = sdn[0];

  for (genvar k = 1; k < NST; k++) begin : g_st
    ast_t fin;
    assign fin = stage_fn(k, ast_t'(sd[k-1]));
    zdo_stage #(.W(DW)) u_s (
      .clk, .rst_n, .in_data(fin), .in_ack(sack[k-1]),
      .succ_done((k == NST - 1) ? succ_done : sdn[(k + 1) % NST]),
      .out_data(sd[k]), .ack(sack[k]), .en(sen[k]), .done(sdn[k])
    );
  end

  ast_t last;
  assign last    = ast_t'(sd[NST-1]);
  assign sum     = last.s;
  assign sum_ack = sack[NST-1];

endmodule
