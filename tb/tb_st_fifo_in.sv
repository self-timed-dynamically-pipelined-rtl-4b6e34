// tb_st_fifo_in: self-checking test of the FIFO from the clocked world into
// the self-timed datapath.
//
// A clocked writer offers words (DEPTH = 4 to reach the full state often)
// only while wr_ready is high; a randomly slow self-timed sink, which stalls
// for a while, reads them.  Checked: words come out in order, none lost or
// doubled; level never exceeds DEPTH and wr_ready is low exactly when the
// FIFO is full; the overflow flag stays low while the writer respects
// wr_ready and becomes (and stays) set after one write into a full FIFO.
module tb_st_fifo_in;
  `include "st_tb_chan.svh"

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 200;
  localparam int DEPTH = 4;

  logic       wr_valid = 1'b0, wr_ready, overflow;
  logic [7:0] wr_data = '0;
  logic [2:0] level;

  `ST_SINK(snk, 8)

  st_fifo_in #(.W(8), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_valid, .wr_data, .wr_ready, .overflow, .level,
    .out_data(snk_data), .out_ack(snk_ack), .succ_done(snk_sdone)
  );

  logic [7:0] sent [$];
  int n_full = 0;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (level > DEPTH || (wr_ready != (level != DEPTH))) begin
      failures++; $display("level %0d wr_ready %b", level, wr_ready);
    end
    if (!wr_ready) n_full++;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < N; i++) begin
        while (!wr_ready) begin wr_valid = 1'b0; @(negedge clk); end
        wr_valid = 1'b1; wr_data = 8'($urandom);
        sent.push_back(wr_data);
        @(negedge clk);
        wr_valid = 1'b0;
        repeat ($urandom_range(1)) @(negedge clk);
      end
      begin
        repeat (100) @(negedge clk);
        snk_hold = 1'b1;
        repeat (30) @(negedge clk);
        snk_hold = 1'b0;
      end
    join
    repeat (40) @(negedge clk);
    checks++;
    if (overflow) begin failures++; $display("overflow without a write into a full FIFO"); end
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never full"); end
    checks++;
    if (snk_q.size() != N) begin failures++; $display("received %0d, expected %0d", snk_q.size(), N); end
    for (int i = 0; i < snk_q.size() && i < N; i++) begin
      checks++;
      if (snk_q[i] !== sent[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h expected %h", i, snk_q[i], sent[i]);
      end
    end
    // overflow: stall the reader and write more than DEPTH words
    snk_hold = 1'b1;
    repeat (4) @(negedge clk);
    wr_valid = 1'b1;
    repeat (DEPTH + 3) @(negedge clk);
    wr_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("no overflow flag"); end
    snk_hold = 1'b0;
    repeat (30) @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("overflow flag not sticky"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
