// sr_chain: the buffer chain that delays u(n) on its way to the coefficient
// updates, with one pipeline depth modifier inside.
//
// N_SR two-stage elements (tr_buffer, starting empty) are chained; a pdm stage
// sits between element PDM_POS-1 and element PDM_POS.  The chain is elastic,
// so it holds as many tokens as the adaptation loops do: every token added or
// removed on the loops is added or removed here too, which keeps each error
// sample paired with the input sample it was computed from.  N_SR bounds the
// number of tokens the chain can hold (one per element).
//
// A buffer chain of such elements with a depth modifier follows the original
// design; N_SR, PDM_POS and empty initial elements are this design's choices.
module sr_chain
  import dlms_pkg::*;
#(
  parameter int unsigned W       = IN_W,
  parameter int unsigned N_SR    = 8,
  parameter int unsigned PDM_POS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_ack,
  output logic         done,
  output logic [W-1:0] out_data,
  output logic         out_ack,
  input  logic         succ_done,
  input  logic         req_add,
  input  logic         req_rem,
  output logic         ack_add,
  output logic         ack_rem
);

  // e_* : signals at the input of element i (index N_SR = chain output)
  logic [W-1:0] e_data [N_SR+1];
  logic         e_ack  [N_SR+1];
  logic         e_done [N_SR+1];   // done seen by whatever drives input i
  logic         e_first [N_SR];
  logic [W-1:0] p_data;
  logic         p_ack, p_en, p_rem, p_done;
  logic [W-1:0] o_data [N_SR];
  logic         o_ack  [N_SR];

  assign e_data[0] = in_data;
  assign e_ack[0]  = in_ack;
  assign done      = e_done[0];

  for (genvar i = 0; i < N_SR; i++) begin : g_el
    logic el_done_unused;
    tr_buffer #(.W(W), .HOLD_TOKEN(1'b0)) u_el (
      .clk, .rst_n,
      .in_data(e_data[i]), .in_ack(e_ack[i]), .done(el_done_unused),
      .out_data(o_data[i]), .out_ack(o_ack[i]), .succ_done(e_done[i+1]),
      .first_ack(e_first[i])
    );
    if (i == PDM_POS) begin : g_after_pdm
      // the pdm drives this element and does not use its done flag
      // (it watches first_ack instead)
    end else begin : g_plain
      assign e_done[i] = el_done_unused;
    end
  end

  for (genvar i = 1; i <= N_SR; i++) begin : g_link
    if (i == PDM_POS) begin : g_pdm_in
      assign e_data[i] = p_data;
      assign e_ack[i]  = p_ack;
    end else begin : g_direct
      assign e_data[i] = o_data[i-1];
      assign e_ack[i]  = o_ack[i-1];
    end
  end

  // the pdm sits in front of element PDM_POS; its predecessor is element PDM_POS-1
  pdm #(.W(W)) u_pdm (
    .clk, .rst_n,
    .in_data(o_data[PDM_POS-1]), .in_ack(o_ack[PDM_POS-1]), .done(p_done),
    .out_data(p_data), .ack(p_ack), .succ_ack(e_first[PDM_POS]), .en(p_en),
    .req_add, .req_rem, .ack_add, .ack_rem, .rem(p_rem)
  );
  assign e_done[PDM_POS] = p_done;

  assign out_data        = e_data[N_SR];
  assign out_ack         = e_ack[N_SR];
  assign e_done[N_SR]    = succ_done;

endmodule
