// st_fifo_out: FIFO from the self-timed datapath to the synchronous
// environment (used for the filter output).
//
// Write side: a self-timed input stage takes a valid word from its
// predecessor whenever it is enabled, empty and the FIFO has room; it writes
// the word into the FIFO at once and therefore precharges right after
// (en falls one cycle after the capture, the stage is free again two cycles
// later).  A full FIFO makes the stage wait, which stalls the datapath
// behind it (the `stall` output shows this).  Read side: first-word-fall-
// through, rd_valid/rd_ready.  DEPTH is this design's choice.
module st_fifo_out #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [W-1:0]           in_data,
  input  logic                   in_ack,
  output logic                   done,
  output logic                   stall,
  output logic                   rd_valid,
  output logic [W-1:0]           rd_data,
  input  logic                   rd_ready,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          en, ack, full, push, pop;

  assign full     = (level == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign push     = en && !ack && in_ack && !full;
  assign stall    = en && !ack && in_ack && full;
  assign rd_valid = (level != '0);
  assign rd_data  = mem[rptr];
  assign pop      = rd_valid && rd_ready;
  assign done     = en && ack;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
      en    <= 1'b1;
      ack   <= 1'b0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      level <= level + LW'(push) - LW'(pop);
      en <= !(en && ack);           // the memory takes the word at once
      if (!en)       ack <= 1'b0;
      else if (push) ack <= 1'b1;
    end
  end

endmodule
