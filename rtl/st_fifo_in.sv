// st_fifo_in: FIFO from the synchronous environment into the self-timed
// datapath (used for u(n) and d(n)).
//
// Write side: a synchronous source presents wr_valid/wr_data; the word is
// stored when the FIFO is not full (wr_ready).  A sample source such as a
// disk read head cannot wait, so a write while full is lost and sets the
// sticky overflow flag.  Read side: the head word is held in a self-timed
// output stage that behaves as a zdo_stage whose predecessor is "FIFO not
// empty": it evaluates (pops) as soon as it is enabled and empty, and
// precharges once its successor has taken the word.
// DEPTH is this design's choice; only the use of such FIFOs as elastic
// buffers between the clocked and the self-timed parts is given.
module st_fifo_in #(
  parameter int unsigned W     = 6,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_valid,
  input  logic [W-1:0]           wr_data,
  output logic                   wr_ready,
  output logic                   overflow,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic [W-1:0]           out_data,
  output logic                   out_ack,
  input  logic                   succ_done
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          push, pop, en;

  assign wr_ready = (level != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign push     = wr_valid && wr_ready;
  assign pop      = en && !out_ack && !succ_done && (level != '0);

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      level    <= '0;
      overflow <= 1'b0;
      en       <= 1'b1;
      out_ack  <= 1'b0;
      out_data <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      level <= level + LW'(push) - LW'(pop);
      if (wr_valid && !wr_ready) overflow <= 1'b1;
      en <= !succ_done;
      if (!en) begin
        out_ack <= 1'b0;
      end else if (pop) begin
        out_ack  <= 1'b1;
        out_data <= mem[rptr];
      end
    end
  end

endmodule
