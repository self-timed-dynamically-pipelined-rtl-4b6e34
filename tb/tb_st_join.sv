// tb_st_join: self-checking test of the self-timed join stage.
//
// Three sources with independent random pacing feed one st_join whose
// function block is a + b + c (8 bits).  A randomly slow sink takes the
// results.  Checked: every result equals the sum of the operands sent as the
// same token index, none lost or doubled, and the join never evaluates
// before all three operands are valid.
module tb_st_join;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 150;

  `ST_SOURCE(a, 8)
  `ST_SOURCE(b, 8)
  `ST_SOURCE(c, 8)
  `ST_SINK(snk, 8)

  logic en, done;
  st_join #(.W(8), .N_IN(3)) dut (
    .clk, .rst_n, .in_data(a_data + b_data + c_data), .in_ack({c_ack, b_ack, a_ack}),
    .succ_done(snk_sdone), .out_data(snk_data), .ack(snk_ack), .en, .done
  );
  assign a_done = done;
  assign b_done = done;
  assign c_done = done;

  logic [7:0] av [N], bv [N], cv [N];

  // the join may only rise while all inputs are valid
  logic ack_q = 1'b0;
  always @(negedge clk) begin
    if (rst_n && snk_ack && !ack_q) begin
      checks++;
      if (!(a_ack && b_ack && c_ack)) begin failures++; $display("join fired early"); end
    end
    ack_q = snk_ack;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (av[i]) begin av[i] = 8'($urandom); bv[i] = 8'($urandom); cv[i] = 8'($urandom); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < N; i++) begin a_put(av[i]); repeat ($urandom_range(3)) @(negedge clk); end
      for (int i = 0; i < N; i++) begin b_put(bv[i]); repeat ($urandom_range(3)) @(negedge clk); end
      for (int i = 0; i < N; i++) begin c_put(cv[i]); repeat ($urandom_range(3)) @(negedge clk); end
    join
    repeat (20) @(negedge clk);
    checks++;
    if (snk_q.size() != N) begin failures++; $display("received %0d, expected %0d", snk_q.size(), N); end
    for (int i = 0; i < snk_q.size() && i < N; i++) begin
      checks++;
      if (snk_q[i] !== 8'(av[i] + bv[i] + cv[i])) begin
        failures++;
        if (failures < 10) $display("token %0d: got %h expected %h", i, snk_q[i], 8'(av[i] + bv[i] + cv[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
