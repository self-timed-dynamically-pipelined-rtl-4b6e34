// dlms_top: self-timed, dynamically pipelined 9-tap DLMS adaptive equalizer.
//
// The filter computes y(n) = w(n-1)' u(n) and adapts its coefficients with
// the delayed LMS rule w(n) = w(n-1) + mu e(n-D) u(n-D), e = d - y.  Every
// arithmetic unit is a chain of self-timed stages, so the adaptation loops
// (coefficient -> filter multiplier -> adder array -> error -> mu multiplier
// -> update multiplier -> coefficient adder -> coefficient) behave as rings
// in which the number of circulating tokens, not a count of registers, sets
// the delay D.  D can be changed while data flow: a pipeline depth modifier
// (pdm) after the mu multiplier adds or removes a token on the common part
// of all nine loops, and a second one in the buffer chain that delays u(n)
// for the updates does the same there, so that every error sample still
// meets the input samples it was computed from.  depth_ctrl steers both
// towards target_depth.
//
// The clocked environment talks to the self-timed core through three FIFOs:
// u(n) and d(n) in, y(n) out.  A write to a full input FIFO is lost and sets
// the overflow flag; a full output FIFO stalls the core.  After reset the
// loops hold only the token of each coefficient register (D = 0, plain LMS)
// and every coefficient is W_INIT; raise target_depth to pipeline deeper.
//
// Timing: one clock cycle models one stage evaluation.  The throughput is
// set by the number of tokens in the loop (D+1) against the loop latency,
// about 32 stages, so a deeper pipeline accepts samples faster (35 cycles
// per sample at D = 0, 12.3 at D = 2) until the handshake cycle of the
// slowest stages sets the rate (about 8 to 9 cycles per sample from D = 4);
// mu may be changed with the depth.
//
// Ports: u/d write ports (valid/ready), y read port (valid/ready), mu
// (Q0.8, signed, keep it non-negative), target_depth/depth/depth_busy, coef
// (current coefficients, tap k in coef[k]).
//
// Follows the original design: the structure, the word lengths (u 6, w 10,
// e 10, mu 9, intermediates 16 bits), 9 taps, 6-stage multipliers and adder
// array, one modifier on the loops plus one in the buffer chain, the three
// FIFOs.  This design's own choices: binary-point positions and bit slices,
// FIFO depth (16), buffer-chain length (8), start at D = 0, the depth
// controller and the overflow/stall flags.  u and d must be offered together
// (write both only when both ready flags are high).
module dlms_top
  import dlms_pkg::*;
#(
  parameter int unsigned                  N_TAPS     = TAPS,
  parameter int unsigned                  FIFO_DEPTH = 16,
  parameter int unsigned                  MULT_ST    = 6,
  parameter int unsigned                  CSA_ST     = 6,
  parameter int unsigned                  N_SR       = 8,
  parameter int unsigned                  MAX_DEPTH  = 7,
  parameter logic [N_TAPS*COEF_W-1:0]     W_INIT     = '0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         u_valid,
  input  logic [IN_W-1:0]              u_data,
  output logic                         u_ready,
  output logic                         u_overflow,
  input  logic                         d_valid,
  input  logic [ACC_W-1:0]             d_data,
  output logic                         d_ready,
  output logic                         d_overflow,
  output logic                         y_valid,
  output logic [ACC_W-1:0]             y_data,
  input  logic                         y_ready,
  output logic                         y_stall,
  input  logic [MU_W-1:0]              mu,
  input  logic [3:0]                   target_depth,
  output logic [3:0]                   depth,
  output logic                         depth_busy,
  output logic [N_TAPS-1:0][COEF_W-1:0] coef
);

  localparam int unsigned LW = $clog2(FIFO_DEPTH + 1);

  // ---------------- input FIFOs and input fork ----------------
  logic [IN_W-1:0]  fu_data, in_fdata;
  logic             fu_ack, fu_done, in_fraw, in_fen;
  logic [1:0]       in_fack, in_fsdone;
  logic [ACC_W-1:0] fd_data;
  logic             fd_ack, fd_done;
  logic [LW-1:0]    u_level, d_level, y_level;

  st_fifo_in #(.W(IN_W), .DEPTH(FIFO_DEPTH)) u_fifo_u (
    .clk, .rst_n, .wr_valid(u_valid), .wr_data(u_data), .wr_ready(u_ready),
    .overflow(u_overflow), .level(u_level),
    .out_data(fu_data), .out_ack(fu_ack), .succ_done(fu_done)
  );

  st_fifo_in #(.W(ACC_W), .DEPTH(FIFO_DEPTH)) u_fifo_d (
    .clk, .rst_n, .wr_valid(d_valid), .wr_data(d_data), .wr_ready(d_ready),
    .overflow(d_overflow), .level(d_level),
    .out_data(fd_data), .out_ack(fd_ack), .succ_done(fd_done)
  );

  // u(n) goes to tap 0 (top delay line) and to the buffer chain
  st_fork #(.W(IN_W), .N_OUT(2)) u_fork_in (
    .clk, .rst_n, .in_data(fu_data), .in_ack(fu_ack), .done(fu_done),
    .out_data(in_fdata), .out_ack(in_fack), .succ_done(in_fsdone),
    .ack(in_fraw), .en(in_fen)
  );

  // ---------------- buffer chain ----------------
  logic [IN_W-1:0]         tt_data [N_TAPS+1];
  logic                    tt_ack  [N_TAPS+1];
  logic                    tt_done [N_TAPS+1];
  logic [IN_W-1:0]         tb_data [N_TAPS+1];
  logic                    tb_ack  [N_TAPS+1];
  logic                    tb_done [N_TAPS+1];
  logic [IN_W-1:0] sr_data;
  logic            sr_ack;
  logic            s_req_add, s_req_rem, s_ack_add, s_ack_rem;

  sr_chain #(.W(IN_W), .N_SR(N_SR), .PDM_POS(N_SR / 2)) u_sr (
    .clk, .rst_n, .in_data(in_fdata), .in_ack(in_fack[1]), .done(in_fsdone[1]),
    .out_data(sr_data), .out_ack(sr_ack), .succ_done(tb_done[0]),
    .req_add(s_req_add), .req_rem(s_req_rem), .ack_add(s_ack_add),
    .ack_rem(s_ack_rem)
  );

  // ---------------- taps ----------------
  logic [N_TAPS*ACC_W-1:0] prods;
  logic [N_TAPS-1:0]       prods_ack;
  logic                    prods_done;
  logic [ACC_W-1:0]        me_fdata;
  logic [N_TAPS-1:0]       me_fack, me_fsdone;

  assign tt_data[0]   = in_fdata;
  assign tt_ack[0]    = in_fack[0];
  assign in_fsdone[0] = tt_done[0];
  assign tb_data[0]   = sr_data;
  assign tb_ack[0]    = sr_ack;
  assign tt_done[N_TAPS] = 1'b0;
  assign tb_done[N_TAPS] = 1'b0;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    dlms_tap #(
      .LAST(k == N_TAPS - 1), .W_INIT(W_INIT[k*COEF_W +: COEF_W]), .MULT_ST(MULT_ST)
    ) u_tap (
      .clk, .rst_n,
      .ut_data(tt_data[k]), .ut_ack(tt_ack[k]), .ut_done(tt_done[k]),
      .utn_data(tt_data[k+1]), .utn_ack(tt_ack[k+1]), .utn_done(tt_done[k+1]),
      .ub_data(tb_data[k]), .ub_ack(tb_ack[k]), .ub_done(tb_done[k]),
      .ubn_data(tb_data[k+1]), .ubn_ack(tb_ack[k+1]), .ubn_done(tb_done[k+1]),
      .me_data(me_fdata), .me_ack(me_fack[k]), .me_done(me_fsdone[k]),
      .p_data(prods[k*ACC_W +: ACC_W]), .p_ack(prods_ack[k]), .p_done(prods_done),
      .w(coef[k])
    );
  end

  // ---------------- filter output, error, mu * e ----------------
  logic [ACC_W-1:0] y_sum, yf_data;
  logic             y_sum_ack, y_sum_done, yf_raw, yf_en;
  logic [1:0]       yf_ack, yf_sdone;
  logic [ERR_W-1:0] e_data;
  logic             e_ack, e_done;
  logic [ERR_W+MU_W-1:0] mue_data;
  logic             mue_ack, mue_done, mu_done_unused;

  csa_array #(.N_IN(N_TAPS), .W(ACC_W), .NST(CSA_ST)) u_csa (
    .clk, .rst_n, .ops(prods), .ops_ack(prods_ack), .ops_done(prods_done),
    .sum(y_sum), .sum_ack(y_sum_ack), .succ_done(y_sum_done)
  );

  // y(n) goes to the output FIFO and to the error adder
  st_fork #(.W(ACC_W), .N_OUT(2)) u_fork_y (
    .clk, .rst_n, .in_data(y_sum), .in_ack(y_sum_ack), .done(y_sum_done),
    .out_data(yf_data), .out_ack(yf_ack), .succ_done(yf_sdone),
    .ack(yf_raw), .en(yf_en)
  );

  st_fifo_out #(.W(ACC_W), .DEPTH(FIFO_DEPTH)) u_fifo_y (
    .clk, .rst_n, .in_data(yf_data), .in_ack(yf_ack[0]), .done(yf_sdone[0]),
    .stall(y_stall), .rd_valid(y_valid), .rd_data(y_data), .rd_ready(y_ready),
    .level(y_level)
  );

  err_stage u_err (
    .clk, .rst_n, .y(yf_data), .y_ack(yf_ack[1]), .d(fd_data), .d_ack(fd_ack),
    .in_done(e_done), .e(e_data), .e_ack, .succ_done(mue_done)
  );
  assign yf_sdone[1] = e_done;
  assign fd_done     = e_done;

  // mu is a static operand: its channel is always valid
  logic mue_sdone;
  bw_mult #(.WA(ERR_W), .WB(MU_W), .NST(MULT_ST)) u_mumult (
    .clk, .rst_n,
    .a(e_data), .a_ack(e_ack), .a_done(mue_done),
    .b(mu), .b_ack(1'b1), .b_done(mu_done_unused),
    .p(mue_data), .p_ack(mue_ack), .succ_done(mue_sdone)
  );

  // ---------------- loop depth modifier and error fork ----------------
  logic [ACC_W-1:0] pdm_data;
  logic             pdm_ack, pdm_en, pdm_rem;
  logic             l_req_add, l_req_rem, l_ack_add, l_ack_rem;
  logic             ef_raw, ef_en, ef_done_unused;

  pdm #(.W(ACC_W)) u_pdm_loop (
    .clk, .rst_n,
    .in_data(mue_data[ERR_W+MU_W-1 -: ACC_W]), .in_ack(mue_ack), .done(mue_sdone),
    .out_data(pdm_data), .ack(pdm_ack), .succ_ack(ef_raw), .en(pdm_en),
    .req_add(l_req_add), .req_rem(l_req_rem), .ack_add(l_ack_add),
    .ack_rem(l_ack_rem), .rem(pdm_rem)
  );

  st_fork #(.W(ACC_W), .N_OUT(N_TAPS)) u_fork_e (
    .clk, .rst_n, .in_data(pdm_data), .in_ack(pdm_ack), .done(ef_done_unused),
    .out_data(me_fdata), .out_ack(me_fack), .succ_done(me_fsdone),
    .ack(ef_raw), .en(ef_en)
  );

  // ---------------- depth control ----------------
  depth_ctrl #(.DW(4), .MAX_DEPTH(MAX_DEPTH)) u_ctrl (
    .clk, .rst_n, .target(target_depth), .depth, .busy(depth_busy),
    .l_ack_add, .l_ack_rem, .l_req_add, .l_req_rem,
    .s_ack_add, .s_ack_rem, .s_req_add, .s_req_rem
  );

endmodule
