// tb_pdm: self-checking test of the pipeline depth modifier and its host
// handshake controller.
//
// A source sends the counting sequence 0, 1, 2, ... through stage A, the
// modifier (stage B) and stage C to a randomly slow sink.  Part-way through,
// the host controller performs one token addition, and later one token
// removal.  Checked:
//   - with no request pending, the modifier passes tokens unchanged;
//   - after the addition the output contains exactly one value twice;
//   - after the removal exactly one value is missing;
//   - each request completes (the host reports it finished) and the
//     request lines return to idle.
module tb_pdm;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 120;

  `ST_SOURCE(src, 8)
  `ST_SINK(snk, 8)

  logic [7:0] a_data, b_data;
  logic a_ack, a_en, b_ack, b_en, b_done, c_en, c_done_unused, rem;
  logic req_add, req_rem, ack_add, ack_rem, busy, finished;
  logic cmd_add = 1'b0, cmd_rem = 1'b0;

  zdo_stage #(.W(8)) u_a (
    .clk, .rst_n, .in_data(src_data), .in_ack(src_ack), .succ_done(b_done),
    .out_data(a_data), .ack(a_ack), .en(a_en), .done(src_done)
  );

  pdm #(.W(8)) dut (
    .clk, .rst_n, .in_data(a_data), .in_ack(a_ack), .done(b_done),
    .out_data(b_data), .ack(b_ack), .succ_ack(snk_ack), .en(b_en),
    .req_add, .req_rem, .ack_add, .ack_rem, .rem
  );

  zdo_stage #(.W(8)) u_c (
    .clk, .rst_n, .in_data(b_data), .in_ack(b_ack), .succ_done(snk_sdone),
    .out_data(snk_data), .ack(snk_ack), .en(c_en), .done(c_done_unused)
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
