// tb_bw_mult: self-checking test of the fine-grain Baugh-Wooley multiplier.
//
// Three instances cover the three multipliers of the equalizer
// (6 x 10 filter, 6 x 16 update, 10 x 9 step size).  Operand pairs, random
// plus the corner values (most negative, -1, 0, most positive), are offered
// through self-timed channels whose producers hold each operand until the
// multiplier's done flag, and the products, taken by a consumer that
// acknowledges at random moments, are compared with a * b worked out by the
// simulator's own signed arithmetic.  The latency of the first product
// (NST stage evaluations) is checked too.
module tb_bw_mult;
  import dlms_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // generic harness for one multiplier size
  `define BW_HARNESS(NAME, WA_, WB_) \
    logic [WA_-1:0] NAME``_a; logic [WB_-1:0] NAME``_b; \
    logic NAME``_aack, NAME``_back, NAME``_adone, NAME``_bdone; \
    logic [WA_+WB_-1:0] NAME``_p; logic NAME``_pack; \
    logic NAME``_sdone; \
    bw_mult #(.WA(WA_), .WB(WB_), .NST(6)) u_``NAME ( \
      .clk, .rst_n, .a(NAME``_a), .a_ack(NAME``_aack), .a_done(NAME``_adone), \
      .b(NAME``_b), .b_ack(NAME``_back), .b_done(NAME``_bdone), \
      .p(NAME``_p), .p_ack(NAME``_pack), .succ_done(NAME``_sdone));

  `BW_HARNESS(m1, 6, 10)
  `BW_HARNESS(m2, 6, 16)
  `BW_HARNESS(m3, 10, 9)

  // ---------- producer: one operand pair per token, held until done ----------
  localparam int NV = 300;

  // expected products per harness (queue in order)
  longint exp1 [$], exp2 [$], exp3 [$];

  function automatic longint corner(input int i, input int w);
    case (i % 4)
      0: return -(longint'(1) << (w-1));
      1: return -1;
      2: return 0;
      default: return (longint'(1) << (w-1)) - 1;
    endcase
  endfunction

  function automatic longint rnd(input int w);
    return longint'($urandom_range((1 << w) - 1)) - (longint'(1) << (w-1));
  endfunction

  `define PRODUCER(NAME, WA_, WB_, EXPQ) \
    initial begin \
      NAME``_aack = 0; NAME``_back = 0; NAME``_a = '0; NAME``_b = '0; \
      wait (rst_n); \
      for (int i = 0; i < NV; i++) begin \
        longint av, bv; \
        av = (i < 16) ? corner(i, WA_) : rnd(WA_); \
        bv = (i < 16) ? corner(i / 4, WB_) : rnd(WB_); \
        @(negedge clk); \
        NAME``_a = WA_'(av); NAME``_b = WB_'(bv); \
        EXPQ.push_back(av * bv); \
        NAME``_aack = 1; NAME``_back = 1; \
        while (!NAME``_adone) @(negedge clk); \
        @(negedge clk); NAME``_aack = 0; NAME``_back = 0; \
        while (NAME``_adone) @(negedge clk); \
        repeat ($urandom_range(2)) @(negedge clk); \
      end \
    end

  `PRODUCER(m1, 6, 10, exp1)
  `PRODUCER(m2, 6, 16, exp2)
  `PRODUCER(m3, 10, 9, exp3)

  // ---------- consumer: a zdo-like successor with random extra holding ----------
  `define CONSUMER(NAME, P_, EXPQ, CNT) \
    int CNT = 0; \
    logic NAME``_cen, NAME``_cack; \
    assign NAME``_sdone = NAME``_cen & NAME``_cack; \
    always @(negedge clk) begin \
      if (!rst_n) begin NAME``_cen = 1; NAME``_cack = 0; end \
      else if (NAME``_cen && !NAME``_cack && NAME``_pack) begin \
        longint e; \
        NAME``_cack = 1; \
        e = EXPQ.pop_front(); \
        checks++; CNT++; \
        if ($signed(NAME``_p) !== P_'(e)) begin \
          failures++; \
          $display("%s: got %0d expected %0d", `"NAME`", longint'($signed(NAME``_p)), e); \
        end \
      end else if (NAME``_cack && ($urandom_range(3) == 0)) begin \
        NAME``_cen = 0; NAME``_cack = 0; \
      end else if (!NAME``_cen) NAME``_cen = 1; \
    end

  `CONSUMER(m1, 16, exp1, n1)
  `CONSUMER(m2, 22, exp2, n2)
  `CONSUMER(m3, 19, exp3, n3)

  // latency of the first product: operands valid at cycle t0, product at t0+6
  int t_in = -1, t_out = -1, cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (rst_n && m1_aack && t_in < 0) t_in = cyc;
    if (rst_n && m1_pack && t_out < 0) t_out = cyc;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n1 == NV && n2 == NV && n3 == NV);
    checks++;
    if (t_out - t_in != 6) begin
      failures++;
      $display("latency %0d, expected 6", t_out - t_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
