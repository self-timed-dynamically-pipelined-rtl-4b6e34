// tb_st_fork: self-checking test of the self-timed fork stage and its clock
// strobe circuit.
//
// One source feeds an st_fork with three output channels; each channel goes
// to its own sink with independent random holding times, and sink 2 is
// stalled for a long stretch in the middle of the run.  Checked: every sink
// receives every token exactly once and in order (the fork waits for the
// slowest branch before it precharges), and during the stall the fork's
// valid flag for a branch that has already taken the token is withdrawn.
module tb_st_fork;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 150;

  `ST_SOURCE(src, 8)
  `ST_SINK(k0, 8)
  `ST_SINK(k1, 8)
  `ST_SINK(k2, 8)

  logic [7:0] odata;
  logic [2:0] oack;
  logic       raw, en;

  st_fork #(.W(8), .N_OUT(3)) dut (
    .clk, .rst_n, .in_data(src_data), .in_ack(src_ack), .done(src_done),
    .out_data(odata), .out_ack(oack), .succ_done({k2_sdone, k1_sdone, k0_sdone}),
    .ack(raw), .en
  );
  assign k0_data = odata; assign k0_ack = oack[0];
  assign k1_data = odata; assign k1_ack = oack[1];
  assign k2_data = odata; assign k2_ack = oack[2];

  logic [7:0] sent [N];
  int withdrawn = 0;

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
        sent[i] = 8'($urandom);
        src_put(sent[i]);
      end
      begin
        repeat (300) @(negedge clk);
        k2_hold = 1'b1;
        repeat (60) begin
          @(negedge clk);
          if (raw && !oack[0] && oack[2]) withdrawn++;
        end
        k2_hold = 1'b0;
      end
    join
    repeat (30) @(negedge clk);
    checks++;
    if (withdrawn == 0) begin failures++; $display("valid flag of a served branch never withdrawn"); end
    check_q(0, k0_q);
    check_q(1, k1_q);
    check_q(2, k2_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(input int k, ref logic [7:0] q [$]);
    checks++;
    if (q.size() != N) begin failures++; $display("sink %0d received %0d, expected %0d", k, q.size(), N); end
    for (int i = 0; i < q.size() && i < N; i++) begin
      checks++;
      if (q[i] !== sent[i]) begin
        failures++;
        if (failures < 10) $display("sink %0d token %0d: got %h expected %h", k, i, q[i], sent[i]);
      end
    end
  endtask
endmodule
