// dlms_tap: one tap of the self-timed DLMS filter.
//
// Data flow (all channels are self-timed: data, valid flag forward, done flag
// backward):
//   * top delay line: u(n-k) arrives on ut; a fork sends it to the filter
//     multiplier and through a TR buffer to the next tap as u(n-k-1);
//   * bottom delay line: the same for the delayed input that feeds the
//     update multiplier (it comes from the buffer chain, so it lags by the
//     pipeline depth);
//   * coefficient loop: the TR buffer holding w_k (one token after reset,
//     value W_INIT) feeds a fork whose two channels go to the filter
//     multiplier (w_k * u(n-k) -> product p to the adder array) and to the
//     coefficient adder; the adder joins w_k with the update
//     delta = u_b * (mu*e) from the update multiplier and writes the new
//     coefficient back into the TR buffer.
// The last tap (LAST = 1) has no fork and no TR buffer on either delay line.
// The update product (22 bits, Q.17) is cut to the 16-bit update (Q.11).
// w exposes the coefficient held by the TR buffer.
//
// The blocks of a tap and their connections follow the original block
// diagram; fork placement, the bit slices and the treatment of the last tap
// are this design's choices.
module dlms_tap
  import dlms_pkg::*;
#(
  parameter bit               LAST   = 1'b0,
  parameter logic [COEF_W-1:0] W_INIT = '0,
  parameter int unsigned      MULT_ST = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // top delay line in / out
  input  logic [IN_W-1:0]   ut_data,
  input  logic              ut_ack,
  output logic              ut_done,
  output logic [IN_W-1:0]   utn_data,
  output logic              utn_ack,
  input  logic              utn_done,
  // bottom delay line in / out
  input  logic [IN_W-1:0]   ub_data,
  input  logic              ub_ack,
  output logic              ub_done,
  output logic [IN_W-1:0]   ubn_data,
  output logic              ubn_ack,
  input  logic              ubn_done,
  // mu * e from the error fork
  input  logic [ACC_W-1:0]  me_data,
  input  logic              me_ack,
  output logic              me_done,
  // filter product to the adder array
  output logic [ACC_W-1:0]  p_data,
  output logic              p_ack,
  input  logic              p_done,
  output logic [COEF_W-1:0] w
);

  localparam int unsigned UP_W = IN_W + ACC_W;

  logic [IN_W-1:0] fa_data, ua_data;
  logic            fa_ack, fa_done, ua_ack, ua_done;

  // ---------------- delay lines ----------------
  if (LAST) begin : g_last
    assign fa_data  = ut_data;
    assign fa_ack   = ut_ack;
    assign ut_done  = fa_done;
    assign ua_data  = ub_data;
    assign ua_ack   = ub_ack;
    assign ub_done  = ua_done;
    assign utn_data = '0;
    assign utn_ack  = 1'b0;
    assign ubn_data = '0;
    assign ubn_ack  = 1'b0;
  end else begin : g_mid
    logic [IN_W-1:0] tf_data, bf_data;
    logic [1:0]      tf_ack, bf_ack;
    logic            tr_t_done, tr_b_done;
    logic            tf_raw, tf_en, bf_raw, bf_en, tft_unused, bfb_unused;

    st_fork #(.W(IN_W), .N_OUT(2)) u_fork_t (
      .clk, .rst_n, .in_data(ut_data), .in_ack(ut_ack), .done(ut_done),
      .out_data(tf_data), .out_ack(tf_ack), .succ_done({tr_t_done, fa_done}),
      .ack(tf_raw), .en(tf_en)
    );
    assign fa_data = tf_data;
    assign fa_ack  = tf_ack[0];

    tr_buffer #(.W(IN_W), .HOLD_TOKEN(1'b1)) u_tr_t (
      .clk, .rst_n, .in_data(tf_data), .in_ack(tf_ack[1]), .done(tr_t_done),
      .out_data(utn_data), .out_ack(utn_ack), .succ_done(utn_done),
      .first_ack(tft_unused)
    );

    st_fork #(.W(IN_W), .N_OUT(2)) u_fork_b (
      .clk, .rst_n, .in_data(ub_data), .in_ack(ub_ack), .done(ub_done),
      .out_data(bf_data), .out_ack(bf_ack), .succ_done({tr_b_done, ua_done}),
      .ack(bf_raw), .en(bf_en)
    );
    assign ua_data = bf_data;
    assign ua_ack  = bf_ack[0];

    tr_buffer #(.W(IN_W), .HOLD_TOKEN(1'b1)) u_tr_b (
      .clk, .rst_n, .in_data(bf_data), .in_ack(bf_ack[1]), .done(tr_b_done),
      .out_data(ubn_data), .out_ack(ubn_ack), .succ_done(ubn_done),
      .first_ack(bfb_unused)
    );
  end

  // ---------------- coefficient loop ----------------
  logic [COEF_W-1:0] wr_data, wf_data, wn_data;
  logic              wr_ack, wr_done, wn_ack, wn_done;
  logic [1:0]        wf_ack;
  logic              wf_fm_done, wf_ca_done, wf_raw, wf_en, wr_first_unused;
  logic [UP_W-1:0]   up_data;
  logic              up_ack, up_done;

  tr_buffer #(.W(COEF_W), .HOLD_TOKEN(1'b1), .INIT_VAL(W_INIT)) u_tr_w (
    .clk, .rst_n, .in_data(wn_data), .in_ack(wn_ack), .done(wn_done),
    .out_data(wr_data), .out_ack(wr_ack), .succ_done(wr_done),
    .first_ack(wr_first_unused)
  );
  assign w = wr_data;

  st_fork #(.W(COEF_W), .N_OUT(2)) u_fork_w (
    .clk, .rst_n, .in_data(wr_data), .in_ack(wr_ack), .done(wr_done),
    .out_data(wf_data), .out_ack(wf_ack), .succ_done({wf_ca_done, wf_fm_done}),
    .ack(wf_raw), .en(wf_en)
  );

  bw_mult #(.WA(IN_W), .WB(COEF_W), .NST(MULT_ST)) u_fmult (
    .clk, .rst_n,
    .a(fa_data), .a_ack(fa_ack), .a_done(fa_done),
    .b(wf_data), .b_ack(wf_ack[0]), .b_done(wf_fm_done),
    .p(p_data), .p_ack, .succ_done(p_done)
  );

  bw_mult #(.WA(IN_W), .WB(ACC_W), .NST(MULT_ST)) u_umult (
    .clk, .rst_n,
    .a(ua_data), .a_ack(ua_ack), .a_done(ua_done),
    .b(me_data), .b_ack(me_ack), .b_done(me_done),
    .p(up_data), .p_ack(up_ack), .succ_done(up_done)
  );

  coef_adder u_cadd (
    .clk, .rst_n,
    .w(wf_data), .w_ack(wf_ack[1]),
    .delta(up_data[UP_W-1 -: ACC_W]), .delta_ack(up_ack),
    .in_done(up_done),
    .w_new(wn_data), .w_new_ack(wn_ack), .succ_done(wn_done)
  );
  assign wf_ca_done = up_done;

endmodule
