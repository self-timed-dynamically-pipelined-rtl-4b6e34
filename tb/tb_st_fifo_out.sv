// tb_st_fifo_out: self-checking test of the FIFO from the self-timed
// datapath to the clocked world.
//
// A self-timed source sends words into the FIFO (DEPTH = 4); a clocked
// reader with random rd_ready, which stops reading for a while, takes them.
// Checked: words come out in order, none lost or doubled; level never
// exceeds DEPTH; while the reader has stopped the FIFO fills, the stall flag
// rises and the source is held (no word accepted while full).
module tb_st_fifo_out;
  `include "st_tb_chan.svh"

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 200;
  localparam int DEPTH = 4;

  `ST_SOURCE(src, 8)

  logic       stall, rd_valid, rd_ready = 1'b0;
  logic [7:0] rd_data;
  logic [2:0] level;
  bit         stop = 1'b0;

  st_fifo_out #(.W(8), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_data(src_data), .in_ack(src_ack), .done(src_done),
    .stall, .rd_valid, .rd_data, .rd_ready, .level
  );

  logic [7:0] sent [$], got [$];
  int n_stall = 0;

  // reader: decides rd_ready at the falling edge and records the word that
  // leaves at the next rising edge
  always @(negedge clk) if (rst_n) begin
    rd_ready = !stop && ($urandom_range(2) != 0);
    if (rd_valid && rd_ready) got.push_back(rd_data);
    checks++;
    if (level > DEPTH) begin failures++; $display("level %0d", level); end
    if (stall) n_stall++;
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
        logic [7:0] v;
        v = 8'($urandom);
        sent.push_back(v);
        src_put(v);
      end
      begin
        int n_before;
        repeat (150) @(negedge clk);
        stop = 1'b1;
        repeat (40) @(negedge clk);
        n_before = sent.size();
        repeat (20) @(negedge clk);
        checks++;
        if (sent.size() != n_before || level != DEPTH) begin
          failures++; $display("source not held while full (level %0d)", level);
        end
        stop = 1'b0;
      end
    join
    repeat (60) @(negedge clk);
    checks++;
    if (n_stall == 0) begin failures++; $display("stall never seen"); end
    checks++;
    if (got.size() != N) begin failures++; $display("received %0d, expected %0d", got.size(), N); end
    for (int i = 0; i < got.size() && i < N; i++) begin
      checks++;
      if (got[i] !== sent[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h expected %h", i, got[i], sent[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
