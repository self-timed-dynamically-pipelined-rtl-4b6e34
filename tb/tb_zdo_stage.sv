// tb_zdo_stage: self-checking test of the zero-delay-overhead stage and of
// the token-holding buffer built from two such stages.
//
// A source feeds two zdo stages (the first applies x ^ 8'h3C as its function
// block) and then a tr_buffer that starts with one token (8'hA5).  A sink
// that holds each datum for a random time takes the outputs.  Checked:
//   - the sink receives the buffer's initial token first, then every
//     source value through the function, in order, nothing lost or doubled;
//   - an empty stage passes a token on one clock cycle after its
//     predecessor's valid flag rises (no latch overhead on the forward path).
module tb_zdo_stage;
  `include "st_tb_chan.svh"
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 200;

  `ST_SOURCE(src, 8)
  `ST_SINK(snk, 8)

  logic [7:0] s1_data, s2_data;
  logic       s1_ack, s1_en, s1_done, s2_ack, s2_en, s2_done, tr_first;

  zdo_stage #(.W(8)) u_s1 (
    .clk, .rst_n, .in_data(src_data ^ 8'h3C), .in_ack(src_ack), .succ_done(s2_done),
    .out_data(s1_data), .ack(s1_ack), .en(s1_en), .done(s1_done)
  );
  assign src_done = s1_done;

  logic tr_done;
  zdo_stage #(.W(8)) u_s2 (
    .clk, .rst_n, .in_data(s1_data), .in_ack(s1_ack), .succ_done(tr_done),
    .out_data(s2_data), .ack(s2_ack), .en(s2_en), .done(s2_done)
  );

  tr_buffer #(.W(8), .HOLD_TOKEN(1'b1), .INIT_VAL(8'hA5)) u_tr (
    .clk, .rst_n, .in_data(s2_data), .in_ack(s2_ack), .done(tr_done),
    .out_data(snk_data), .out_ack(snk_ack), .succ_done(snk_sdone),
    .first_ack(tr_first)
  );

  logic [7:0] sent [$];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    snk_hold = 1'b1;                       // keep the first token in the buffer
    // latency of the first token through the two empty stages
    @(negedge clk);
    src_data = 8'h11; src_ack = 1'b1;
    lat = 0;
    while (!s2_ack && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("latency %0d cycles, expected 2", lat); end
    while (!src_done) @(negedge clk);
    @(negedge clk); src_ack = 1'b0;
    while (src_done) @(negedge clk);
    sent.push_back(8'h11 ^ 8'h3C);
    snk_hold = 1'b0;
    for (int i = 1; i < N; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      src_put(v);
      sent.push_back(v ^ 8'h3C);
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (snk_q.size() != N + 1) begin
      failures++;
      $display("received %0d tokens, expected %0d", snk_q.size(), N + 1);
    end
    checks++;
    if (snk_q.size() > 0 && snk_q[0] !== 8'hA5) begin
      failures++; $display("first token %h, expected a5", snk_q[0]);
    end
    for (int i = 1; i < snk_q.size() && i <= N; i++) begin
      checks++;
      if (snk_q[i] !== sent[i-1]) begin
        failures++;
        if (failures < 10) $display("token %0d: got %h expected %h", i, snk_q[i], sent[i-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
