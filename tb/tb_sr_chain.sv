// tb_sr_chain: self-checking test of the buffer chain of the lower delay
// line, with its depth modifier.
//
// A source sends the counting sequence 0, 1, 2, ... through an 8-element
// sr_chain (modifier after element 4) to a randomly slow sink.  Part-way
// through, a host controller adds one token to the chain, and later removes
// one.  Checked:
//   - with no request pending, the chain passes every token in order;
//   - after the addition the output contains exactly one value twice;
//   - after the removal exactly one value is missing;
//   - each request completes and the request lines return to idle.
module tb_sr_chain;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 120;

  `ST_SOURCE(src, 8)
  `ST_SINK(snk, 8)

  logic req_add, req_rem, ack_add, ack_rem, busy, finished;
  logic cmd_add = 1'b0, cmd_rem = 1'b0;

  sr_chain #(.W(8), .N_SR(8), .PDM_POS(4)) dut (
    .clk, .rst_n, .in_data(src_data), .in_ack(src_ack), .done(src_done),
    .out_data(snk_data), .out_ack(snk_ack), .succ_done(snk_sdone),
    .req_add, .req_rem, .ack_add, .ack_rem
  );

  pdm_host u_host (
    .clk, .rst_n, .cmd_add, .cmd_rem, .ack_add, .ack_rem,
    .req_add, .req_rem, .busy, .finished
  );

  int n_fin = 0;
  always @(negedge clk) if (rst_n && finished) n_fin++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(input bit add);
    @(negedge clk);
    if (add) cmd_add = 1'b1; else cmd_rem = 1'b1;
    @(negedge clk);
    cmd_add = 1'b0; cmd_rem = 1'b0;
  endtask

  initial begin
    int dups, gaps, other, n_add_at, n_rem_at;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < N; i++) begin
        src_put(8'(i));
        repeat ($urandom_range(2)) @(negedge clk);
      end
      begin
        wait (snk_q.size() == 30);
        command(1'b1);
        wait (!busy);
        n_add_at = snk_q.size();
        wait (snk_q.size() == 70);
        command(1'b0);
        wait (!busy);
        n_rem_at = snk_q.size();
      end
    join
    repeat (30) @(negedge clk);
    dups = 0; gaps = 0; other = 0;
    for (int i = 1; i < snk_q.size(); i++) begin
      int d;
      d = int'(snk_q[i]) - int'(snk_q[i-1]);
      if (d == 0) dups++;
      else if (d == 2) gaps++;
      else if (d != 1) other++;
    end
    checks++;
    if (snk_q.size() == 0 || snk_q[0] !== 8'd0) begin failures++; $display("first token wrong"); end
    checks++;
    if (dups != 1) begin failures++; $display("%0d repeated tokens, expected 1", dups); end
    checks++;
    if (gaps != 1) begin failures++; $display("%0d missing tokens, expected 1", gaps); end
    checks++;
    if (other != 0) begin failures++; $display("%0d out-of-order tokens", other); end
    checks++;
    if (snk_q.size() != N) begin failures++; $display("received %0d, expected %0d", snk_q.size(), N); end
    checks++;
    if (n_fin != 2) begin failures++; $display("host finished %0d times, expected 2", n_fin); end
    checks++;
    if (!(req_add && req_rem)) begin failures++; $display("request lines not idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
