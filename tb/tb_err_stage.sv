// tb_err_stage: self-checking test of the error stage e = d - y.
//
// Two sources (filter output y and desired sample d, both 16 bits) with
// independent random pacing feed the stage; a randomly slow sink takes the
// 10-bit errors.  Each error is compared with the upper 10 bits of the
// 16-bit wrapped difference d - y, worked out by the testbench; corner
// pairs (largest positive and negative differences, wrap-around) come first.
module tb_err_stage;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 200;

  `ST_SOURCE(y, 16)
  `ST_SOURCE(d, 16)
  `ST_SINK(snk, 10)

  logic done;
  err_stage dut (
    .clk, .rst_n, .y(y_data), .y_ack, .d(d_data), .d_ack, .in_done(done),
    .e(snk_data), .e_ack(snk_ack), .succ_done(snk_sdone)
  );
  assign y_done = done;
  assign d_done = done;

  logic [15:0] yv [N], dv [N];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (yv[i]) begin yv[i] = 16'($urandom); dv[i] = 16'($urandom); end
    yv[0] = 16'h8000; dv[0] = 16'h7fff;    // wraps
    yv[1] = 16'h0000; dv[1] = 16'h7fff;
    yv[2] = 16'h0040; dv[2] = 16'h0000;    // -64: exactly -1 in the error LSB
    yv[3] = 16'h0001; dv[3] = 16'h0000;    // -1: truncates to -1
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < N; i++) begin y_put(yv[i]); repeat ($urandom_range(3)) @(negedge clk); end
      for (int i = 0; i < N; i++) begin d_put(dv[i]); repeat ($urandom_range(3)) @(negedge clk); end
    join
    repeat (20) @(negedge clk);
    checks++;
    if (snk_q.size() != N) begin failures++; $display("received %0d, expected %0d", snk_q.size(), N); end
    for (int i = 0; i < snk_q.size() && i < N; i++) begin
      int diff, e;
      diff = int'($signed(16'(dv[i] - yv[i])));
      e = diff >>> 6;
      checks++;
      if (int'($signed(snk_q[i])) != e) begin
        failures++;
        if (failures < 10) $display("error %0d: got %0d expected %0d", i, int'($signed(snk_q[i])), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
