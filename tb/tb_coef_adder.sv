// tb_coef_adder: self-checking test of the coefficient update adder
// w_new = sat10(w + (delta >>> 3)).
//
// Two sources (old coefficient, 10 bits, and update, 16 bits) with
// independent random pacing feed the stage; a randomly slow sink takes the
// new coefficients.  Each is compared with the sum worked out by the
// testbench, saturated to the 10-bit range [-512, 511]; the first pairs
// drive both saturation limits.
module tb_coef_adder;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 200;

  `ST_SOURCE(w, 10)
  `ST_SOURCE(dl, 16)
  `ST_SINK(snk, 10)

  logic done;
  coef_adder dut (
    .clk, .rst_n, .w(w_data), .w_ack, .delta(dl_data), .delta_ack(dl_ack),
    .in_done(done), .w_new(snk_data), .w_new_ack(snk_ack), .succ_done(snk_sdone)
  );
  assign w_done  = done;
  assign dl_done = done;

  logic [9:0]  wv [N];
  logic [15:0] dv [N];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wv[i]) begin wv[i] = 10'($urandom); dv[i] = 16'($urandom_range(8191)) - 16'd4096; end
    wv[0] = 10'd500;          dv[0] = 16'd800;      // saturates high
    wv[1] = 10'h200;          dv[1] = 16'hff00;     // -512 - 32: saturates low
    wv[2] = 10'd0;            dv[2] = 16'h7fff;     // largest update
    wv[3] = 10'd0;            dv[3] = 16'hfff9;     // -7 >>> 3 = -1
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < N; i++) begin w_put(wv[i]); repeat ($urandom_range(3)) @(negedge clk); end
      for (int i = 0; i < N; i++) begin dl_put(dv[i]); repeat ($urandom_range(3)) @(negedge clk); end
    join
    repeat (20) @(negedge clk);
    checks++;
    if (snk_q.size() != N) begin failures++; $display("received %0d, expected %0d", snk_q.size(), N); end
    for (int i = 0; i < snk_q.size() && i < N; i++) begin
      int s;
      s = int'($signed(wv[i])) + (int'($signed(dv[i])) >>> 3);
      if (s > 511) s = 511;
      if (s < -512) s = -512;
      checks++;
      if (int'($signed(snk_q[i])) != s) begin
        failures++;
        if (failures < 10) $display("coef %0d: got %0d expected %0d", i, int'($signed(snk_q[i])), s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
