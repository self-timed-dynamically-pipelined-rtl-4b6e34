// bw_mult: fine-grain self-timed two's complement multiplier (Baugh-Wooley),
// P = A * B with A of WA bits, B of WB bits and a WA+WB bit product.
//
// The Baugh-Wooley form turns the signed product into a sum of positive
// rows: row i holds a_i & b_j at weight i+j, with the bits that pair one
// sign bit with a non-sign bit complemented, plus the constant
// 2^(WA-1) + 2^(WB-1) + 2^(WA+WB-1) (all modulo 2^(WA+WB)).  The rows are
// accumulated by a carry-save adder array and the final sum and carry words
// are merged by a carry-ripple adder.
//
// The array is cut into NST self-timed stages.  Stage 0 is a join of the two
// operand channels; stages 0..NST-2 each add their share of the rows
// (row i goes to stage i*(NST-1)/WA) into the carry-save pair, and stage
// NST-1 is the ripple adder.  The operands travel with the partial result.
// Latency is NST stage evaluations; a new operand pair can enter every few
// stage delays, as in any zdo pipeline.  NST = 6 is at the low end of the
// 6 to 8 stages used for the multipliers; the cut points are this design's
// choice.
module bw_mult
  import dlms_pkg::*;
#(
  parameter int unsigned WA  = 6,
  parameter int unsigned WB  = 10,
  parameter int unsigned NST = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WA-1:0]      a,
  input  logic               a_ack,
  output logic               a_done,
  input  logic [WB-1:0]      b,
  input  logic               b_ack,
  output logic               b_done,
  output logic [WA+WB-1:0]   p,
  output logic               p_ack,
  input  logic               succ_done
);

  localparam int unsigned P = WA + WB;

  typedef struct packed {
    logic [WA-1:0] a;
    logic [WB-1:0] b;
    logic [P-1:0]  s;
    logic [P-1:0]  c;
  } mst_t;

  localparam int unsigned DW = $bits(mst_t);
  localparam logic [P-1:0] BW_CONST =
      (P'(1) << (WA-1)) + (P'(1) << (WB-1)) + (P'(1) << (P-1));

  // Baugh-Wooley partial-product row i.
  function automatic logic [P-1:0] bw_row(input int i, input logic [WA-1:0] av,
                                          input logic [WB-1:0] bv);
    logic [P-1:0] r;
    r = '0;
    for (int j = 0; j < int'(WB); j++) begin
      logic bit_v;
      bit_v = av[i] & bv[j];
      if ((i == int'(WA) - 1) != (j == int'(WB) - 1)) bit_v = !bit_v;
      r[i+j] = bit_v;
    end
    return r;
  endfunction

  // Work done by stage k on the partial result.
  function automatic mst_t stage_fn(input int k, input mst_t x);
    mst_t o;
    logic [P-1:0] r, s2, c2;
    o = x;
    if (k == int'(NST) - 1) begin
      o.s = x.s + x.c;                  // carry-ripple merge
      o.c = '0;
    end else begin
      for (int i = 0; i < int'(WA); i++) begin
        if ((i * (int'(NST) - 1)) / int'(WA) == k) begin
          r    = bw_row(i, o.a, o.b);
          s2   = o.s ^ o.c ^ r;         // 3:2 carry-save row
          c2   = ((o.s & o.c) | (o.s & r) | (o.c & r)) << 1;
          o.s  = s2;
          o.c  = c2;
        end
      end
    end
    return o;
  endfunction

  logic [DW-1:0] sd   [NST];
  logic          sack [NST];
  logic          sen  [NST];
  logic          sdn  [NST];

  mst_t first_in;
  assign first_in = stage_fn(0, mst_t'{a: a, b: b, s: BW_CONST, c: '0});

  logic jdone;
  st_join #(.W(DW), .N_IN(2)) u_s0 (
    .clk, .rst_n, .in_data(first_in), .in_ack({a_ack, b_ack}),
    .succ_done((NST > 1) ? sdn[1 % NST] : succ_done),
    .out_data(sd[0]), .ack(sack[0]), .en(sen[0]), .done(jdone)
  );
  assign a_done = jdone;
  assign b_done = jdone;
  assign sdn[0] = jdone;

  for (genvar k = 1; k < NST; k++) begin : g_st
    mst_t fin;
    assign fin = stage_fn(k, mst_t'(sd[k-1]));
    zdo_stage #(.W(DW)) u_s (
      .clk, .rst_n, .in_data(fin), .in_ack(sack[k-1]),
      .succ_done((k == NST - 1) ? succ_done : sdn[(k + 1) % NST]),
      .out_data(sd[k]), .ack(sack[k]), .en(sen[k]), .done(sdn[k])
    );
  end

  mst_t last;
  assign last  = mst_t'(sd[NST-1]);
  assign p     = last.s;
  assign p_ack = sack[NST-1];

endmodule
