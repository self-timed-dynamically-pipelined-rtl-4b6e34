// err_stage: self-timed error adder, e(n) = d(n) - y(n).
//
// A single join stage: it waits for both the filter output y (from the adder
// array) and the desired sample d (from its input FIFO), subtracts them in
// 16 bits (Q2.13, wrapping) and keeps the upper ERR_W bits as the fed-back
// error (Q2.7, truncation by ERR_SHIFT bits).  The error word length is
// given; the truncation and the single-stage implementation are this
// design's choice.
module err_stage
  import dlms_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ACC_W-1:0]  y,
  input  logic              y_ack,
  input  logic [ACC_W-1:0]  d,
  input  logic              d_ack,
  output logic              in_done,   // to both input channels
  output logic [ERR_W-1:0]  e,
  output logic              e_ack,
  input  logic              succ_done
);

  logic [ACC_W-1:0] diff;
  logic [ERR_W-1:0] e_new;
  logic             en_unused;

  assign diff  = d - y;
  assign e_new = diff[ACC_W-1 -: ERR_W];

  st_join #(.W(ERR_W), .N_IN(2)) u_join (
    .clk, .rst_n, .in_data(e_new), .in_ack({y_ack, d_ack}), .succ_done,
    .out_data(e), .ack(e_ack), .en(en_unused), .done(in_done)
  );

endmodule
