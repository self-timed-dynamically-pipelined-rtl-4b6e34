// tb_csa_array: self-checking test of the pipelined carry-save adder array
// that sums the nine tap products.
//
// Nine operand channels (16 bits each) are raised at random, different
// moments for every token; a randomly slow sink takes the sums.  200 tokens
// (the first ones corner values: all most-negative, all -1, all
// most-positive) are checked against the sum of the operands modulo 2^16,
// the word length of the datapath.  The latency of the first sum through the
// empty array (NST = 6 stage evaluations) is checked too.
module tb_csa_array;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 200;
  localparam int NI = 9;

  logic [NI*16-1:0] ops = '0;
  logic [NI-1:0]    ops_ack = '0;
  logic             ops_done;

  `ST_SINK(snk, 16)

  csa_array #(.N_IN(NI), .W(16), .NST(6)) dut (
    .clk, .rst_n, .ops, .ops_ack, .ops_done,
    .sum(snk_data), .sum_ack(snk_ack), .succ_done(snk_sdone)
  );

  logic [15:0] expq [$];
  int t_in = -1, t_out = -1, cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (rst_n && (&ops_ack) && t_in < 0) t_in = cyc;
    if (rst_n && snk_ack && t_out < 0) t_out = cyc;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      logic [15:0] s;
      s = '0;
      for (int k = 0; k < NI; k++) begin
        logic [15:0] v;
        case (t)
          0: v = 16'h8000;
          1: v = 16'hffff;
          2: v = 16'h7fff;
          default: v = 16'($urandom);
        endcase
        ops[k*16 +: 16] = v;
        s += v;
      end
      expq.push_back(s);
      // raise the channels one after another, in random groups
      @(negedge clk);
      while (!(&ops_ack)) begin
        for (int k = 0; k < NI; k++) if ($urandom_range(2) == 0) ops_ack[k] = 1'b1;
        if (t == 0) ops_ack = '1;
        @(negedge clk);
      end
      while (!ops_done) @(negedge clk);
      @(negedge clk); ops_ack = '0;
      while (ops_done) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (t_out - t_in != 6) begin failures++; $display("latency %0d, expected 6", t_out - t_in); end
    checks++;
    if (snk_q.size() != N) begin failures++; $display("received %0d, expected %0d", snk_q.size(), N); end
    for (int i = 0; i < snk_q.size() && i < N; i++) begin
      checks++;
      if (snk_q[i] !== expq[i]) begin
        failures++;
        if (failures < 10) $display("sum %0d: got %h expected %h", i, snk_q[i], expq[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
