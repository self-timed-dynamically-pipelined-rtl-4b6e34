// coef_adder: self-timed coefficient update adder, w(n) = w(n-1) + delta.
//
// A single join stage: it waits for the old coefficient (from the
// coefficient fork) and the update (from the update multiplier), aligns the
// 16-bit update (Q.11) to the coefficient (Q1.8) by an arithmetic shift of
// ALIGN_SHIFT bits, adds, and saturates to COEF_W bits.  Saturation and the
// single-stage implementation are this design's choice.
module coef_adder
  import dlms_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COEF_W-1:0]  w,
  input  logic               w_ack,
  input  logic [ACC_W-1:0]   delta,
  input  logic               delta_ack,
  output logic               in_done,
  output logic [COEF_W-1:0]  w_new,
  output logic               w_new_ack,
  input  logic               succ_done
);

  logic signed [16:0]       sum;
  logic signed [COEF_W-1:0] res;
  logic                     en_unused;

  assign sum = 17'(signed'(w)) + 17'(signed'(delta) >>> ALIGN_SHIFT);
  assign res = sat_coef(sum);

  st_join #(.W(COEF_W), .N_IN(2)) u_join (
    .clk, .rst_n, .in_data(res), .in_ack({w_ack, delta_ack}), .succ_done,
    .out_data(w_new), .ack(w_new_ack), .en(en_unused), .done(in_done)
  );

endmodule
