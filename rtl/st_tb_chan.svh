// st_tb_chan.svh: testbench helpers for self-timed channels.
//
// A channel carries a datum, a valid flag (the producing stage's completion
// flag, "ack") and a done flag sent back by the consuming stage.  The
// producer holds the datum until done rises, withdraws it, and waits for
// done to fall before offering the next one (return-to-zero handshake).
//
// ST_SOURCE(N, W)  declares N_data, N_ack (driven by the testbench),
//                  N_done (to be connected to the block), and the task
//                  N_put(value) that passes one token.
// ST_SINK(N, W)    declares N_data, N_ack (to be connected to the block's
//                  output), N_sdone (the done flag given back), a queue N_q
//                  of received values and a zdo-like consumer that takes a
//                  token whenever it is enabled and empty and then holds it
//                  for a random 0..3 extra cycles before precharging.  Set
//                  N_hold = 1 to stop it taking tokens (a stalled successor).
// All testbench actions happen at falling clock edges.
`ifndef ST_TB_CHAN_SVH
`define ST_TB_CHAN_SVH

`define ST_SOURCE(N, W) \
  logic [(W)-1:0] N``_data = '0; \
  logic           N``_ack  = 1'b0; \
  logic           N``_done; \
  task automatic N``_put(input logic [(W)-1:0] v); \
    @(negedge clk); \
    N``_data = v; N``_ack = 1'b1; \
    while (!N``_done) @(negedge clk); \
    @(negedge clk); N``_ack = 1'b0; \
    while (N``_done) @(negedge clk); \
  endtask

`define ST_SINK(N, W) \
  logic [(W)-1:0] N``_data; \
  logic           N``_ack; \
  logic           N``_en = 1'b1, N``_full = 1'b0, N``_hold = 1'b0; \
  logic           N``_sdone; \
  logic [(W)-1:0] N``_q [$]; \
  assign N``_sdone = N``_en & N``_full; \
  always @(negedge clk) begin \
    if (!rst_n) begin \
      N``_en = 1'b1; N``_full = 1'b0; \
    end else if (!N``_en) begin \
      N``_en = 1'b1; \
    end else if (!N``_full && N``_ack && !N``_hold) begin \
      N``_full = 1'b1; \
      N``_q.push_back(N``_data); \
    end else if (N``_full && ($urandom_range(3) == 0)) begin \
      N``_en = 1'b0; N``_full = 1'b0; \
    end \
  end

`endif
