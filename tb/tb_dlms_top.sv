// tb_dlms_top: end-to-end test of the self-timed DLMS equalizer at its
// default size (9 taps, 6-stage multipliers and adder array, 8-element
// buffer chain, 16-word FIFOs).
//
// A reference model written directly from the DLMS recursion
//   y(n) = sum_k w_k(n-1) u(n-k),  e(n) = d(n) - y(n),
//   w(n) = w(n-1) + mu e(n-D) u(n-D)
// with the equalizer's fixed-point word lengths predicts every output.
// Runs, each after a reset:
//   1. D = 0 (plain LMS): random u(n), d(n) from a known target response;
//      every y(n) is compared.
//   2. the depth is raised to 4 while zero samples flow (token addition on
//      both depth modifiers), then the same kind of data is sent and every
//      y(n) is compared with the reference at D = 4.
//   3. throughput at D = 0, 2, 4, 6 with the input offered as fast as it is
//      accepted: a deeper loop must accept samples faster until the
//      forward path limits the rate (D = 6 may not be slower than D = 4).
//   4. depth changes while data flow (6 -> 3 -> 5: token removal and
//      addition), an output stall (y_ready held low until the output FIFO
//      is full) and an input overflow (samples offered faster than the
//      loop accepts them); the number of outputs must equal the number of
//      inputs.
// Each mechanism is counted and a mechanism that never happened is a
// failure.  A watchdog ends the run.
module tb_dlms_top;
  import dlms_pkg::*;

  localparam int NT = TAPS;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              u_valid, u_ready, u_overflow, d_valid, d_ready, d_overflow;
  logic [IN_W-1:0]   u_data;
  logic [ACC_W-1:0]  d_data, y_data;
  logic              y_valid, y_ready, y_stall, depth_busy;
  logic [MU_W-1:0]   mu;
  logic [3:0]        target_depth, depth;
  logic [NT-1:0][COEF_W-1:0] coef;

  dlms_top dut (
    .clk, .rst_n, .u_valid, .u_data, .u_ready, .u_overflow,
    .d_valid, .d_data, .d_ready, .d_overflow,
    .y_valid, .y_data, .y_ready, .y_stall,
    .mu, .target_depth, .depth, .depth_busy, .coef
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_add = 0, n_rem = 0, n_ystall = 0, n_ovf = 0, n_fifo_full = 0;
  logic [3:0] depth_q = '0;
  always @(negedge clk) begin
    #1;
    depth_q <= depth;
    if (rst_n && depth > depth_q) n_add++;
    if (rst_n && depth < depth_q) n_rem++;
    if (y_stall) n_ystall++;
    if (!u_ready) n_fifo_full++;
  end

  // ---------------- reference model ----------------
  localparam int HMAX = 4096;
  int signed  ref_u  [HMAX];
  int signed  ref_me [HMAX];
  int signed  ref_w  [NT];
  int signed  ref_y  [HMAX];
  int signed  ref_e  [HMAX];
  int         ref_n;
  int         ref_D;
  int signed  h [NT] = '{0, 12, -40, 96, 200, 96, -40, 12, 0};

  function automatic int signed sx(input longint v, input int bits);
    longint m = longint'(1) << bits;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return int'(r);
  endfunction

  task automatic ref_reset(input int D);
    ref_n = 0; ref_D = D;
    foreach (ref_w[k]) ref_w[k] = 0;
  endtask

  // one sample through the reference; returns y
  task automatic ref_step(input int signed uu, input int signed dd, input int signed muv);
    longint acc = 0;
    int signed e16, e10, me;
    int n = ref_n;
    ref_u[n] = uu;
    for (int k = 0; k < NT; k++)
      if (n - k >= 0) acc += longint'(ref_w[k]) * ref_u[n-k];
    ref_y[n] = sx(acc, 16);
    e16 = sx(longint'(dd) - ref_y[n], 16);
    e10 = e16 >>> 6;
    me  = sx((longint'(e10) * muv) >>> 3, 16);
    ref_e[n]  = e16;
    ref_me[n] = me;
    for (int k = 0; k < NT; k++) begin
      int m = n - ref_D;
      longint dl;
      int signed up, nw;
      if (m >= 0 && m - k >= 0) begin
        dl = (longint'(ref_u[m-k]) * ref_me[m]) >>> 6;
        up = sx(dl, 16) >>> 3;
        nw = ref_w[k] + up;
        if (nw > 511) nw = 511;
        if (nw < -512) nw = -512;
        ref_w[k] = nw;
      end
    end
    ref_n = n + 1;
  endtask

  // desired signal: target response of the channel
  function automatic int signed desired(input int n);
    longint acc = 0;
    for (int k = 0; k < NT; k++)
      if (n - k >= 0) acc += longint'(h[k]) * ref_u[n-k];
    return sx(acc, 16);
  endfunction

  // ---------------- stimulus / monitor ----------------
  int signed stim_u [HMAX];
  int signed stim_d [HMAX];
  int n_sent, n_recv, n_cmp_from, n_cmp_to;
  bit compare_on;
  longint t_first, t_last;

  // outputs are sampled just after the falling edge, where the inputs set by
  // the stimulus for the next rising edge are already in place
  always @(negedge clk) begin
    #1;
    if (rst_n && y_valid && y_ready) begin
      if (compare_on && n_recv >= n_cmp_from && n_recv < n_cmp_to) begin
        checks++;
        if (y_data !== ref_y[n_recv][15:0]) begin
          failures++;
          if (failures < 10)
            $display("y mismatch n=%0d got %0d exp %0d", n_recv, int'($signed(y_data)), ref_y[n_recv]);
        end
      end
      if (n_recv == 0) t_first = cycle;
      t_last = cycle;
      n_recv++;
    end
  end

  task automatic do_reset();
    rst_n = 1'b0; u_valid = 0; d_valid = 0; u_data = '0; d_data = '0;
    y_ready = 1'b1; target_depth = '0;
    n_sent = 0; n_recv = 0; compare_on = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  // send sample i of the stimulus arrays, waiting for room.  Called at a
  // falling edge; returns at the falling edge after the word was taken and
  // leaves the valid flags set (idle() clears them).
  // u and d are offered together, only when both FIFOs have room.
  task automatic send(input int i);
    while (!(u_ready && d_ready)) begin
      u_valid = 1'b0; d_valid = 1'b0;
      @(negedge clk);
    end
    u_valid = 1'b1; d_valid = 1'b1;
    u_data  = stim_u[i][IN_W-1:0];
    d_data  = stim_d[i][ACC_W-1:0];
    @(negedge clk);
    n_sent++;
  endtask

  // like send(), but gives up after `limit` falling edges without room
  task automatic try_send(input int i, input int limit, output bit ok);
    int t = 0;
    while (!(u_ready && d_ready) && t < limit) begin
      u_valid = 1'b0; d_valid = 1'b0;
      @(negedge clk);
      t++;
    end
    ok = u_ready && d_ready;
    if (ok) begin
      u_valid = 1'b1; d_valid = 1'b1;
      u_data  = stim_u[i][IN_W-1:0];
      d_data  = stim_d[i][ACC_W-1:0];
      @(negedge clk);
      n_sent++;
    end
  endtask

  task automatic idle();
    u_valid = 1'b0; d_valid = 1'b0;
  endtask

  task automatic make_data(input int from, input int cnt, input bit zero);
    for (int i = from; i < from + cnt; i++) begin
      stim_u[i] = zero ? 0 : ($urandom_range(62) - 31);
      ref_u[i]  = stim_u[i];
      stim_d[i] = zero ? 0 : desired(i);
    end
  endtask

  task automatic wait_outputs(input int cnt, input int limit);
    int t = 0;
    idle();
    while (n_recv < cnt && t < limit) begin @(negedge clk); t++; end
    checks++;
    if (n_recv != cnt) begin
      failures++;
      $display("output count %0d, expected %0d", n_recv, cnt);
    end
  endtask

  task automatic set_depth(input int dd, input int zero_from);
    int i = zero_from;
    target_depth = 4'(dd);
    // keep samples flowing until the depth is reached
    while (depth != 4'(dd) || depth_busy) begin
      make_data(i, 1, 1'b1);
      send(i);
      i++;
    end
    idle();
  endtask

  // throughput run: returns cycles per sample over cnt samples
  task automatic rate_run(input int D, input int cnt, output real cps);
    do_reset();
    mu = 9'd16;
    ref_reset(0);
    set_depth(D, 0);
    begin
      int base = n_sent;
      make_data(base, cnt, 1'b0);
      for (int i = base; i < base + cnt; i++) send(i);
      wait_outputs(base + cnt, 20000);
      cps = real'(t_last - t_first) / real'(n_recv - 1);
    end
  endtask

  real cps0, cps2, cps4, cps6;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mu = 9'd16;
    // -------- run 1: D = 0, exact --------
    do_reset();
    ref_reset(0);
    make_data(0, 120, 1'b0);
    for (int i = 0; i < 120; i++) ref_step(stim_u[i], stim_d[i], 16);
    compare_on = 1; n_cmp_from = 0; n_cmp_to = 120;
    for (int i = 0; i < 120; i++) send(i);
    wait_outputs(120, 20000);
    checks++;
    if (depth != 0) failures++;

    // -------- run 2: D = 4 via token addition, exact --------
    do_reset();
    ref_reset(4);
    set_depth(4, 0);
    begin
      int z;
      z = n_sent;
      make_data(z, 60, 1'b1);            // flush with zeros
      make_data(z + 60, 200, 1'b0);
      for (int i = 0; i < z + 260; i++) ref_step(stim_u[i], stim_d[i], 16);
      compare_on = 1; n_cmp_from = 0; n_cmp_to = z + 260;
      for (int i = z; i < z + 260; i++) send(i);
      wait_outputs(z + 260, 40000);
      // the adaptation has reduced the error
      begin
        longint e_early = 0, e_late = 0;
        for (int i = z + 60; i < z + 100; i++) e_early += (ref_e[i] < 0) ? -ref_e[i] : ref_e[i];
        for (int i = z + 220; i < z + 260; i++) e_late += (ref_e[i] < 0) ? -ref_e[i] : ref_e[i];
        checks++;
        if (!(e_late * 2 < e_early)) begin
          failures++;
          $display("no convergence: early %0d late %0d", e_early, e_late);
        end
      end
      checks++;
      if (depth != 4) failures++;
    end
    compare_on = 0;

    // -------- run 3: throughput against depth --------
    rate_run(0, 60, cps0);
    rate_run(2, 60, cps2);
    rate_run(4, 60, cps4);
    rate_run(6, 60, cps6);
    $display("cycles per sample: D0 %0.2f D2 %0.2f D4 %0.2f D6 %0.2f", cps0, cps2, cps4, cps6);
    checks++;
    if (!(cps2 < cps0 && cps4 < cps2 && cps6 <= cps4 * 1.02)) begin
      failures++;
      $display("throughput does not grow with depth");
    end

    // -------- run 4: depth changes, stall, overflow --------
    do_reset();
    ref_reset(0);
    set_depth(6, 0);
    begin
      int base;
      int i;
      base = n_sent;
      make_data(base, 600, 1'b0);
      i = base;
      // data with a depth change 6 -> 3
      target_depth = 4'd3;
      repeat (150) begin send(i); i++; end
      checks++;
      if (depth != 3) begin failures++; $display("depth %0d, expected 3", depth); end
      // output stall: stop reading until the core stalls
      y_ready = 1'b0;
      begin
        bit ok;
        ok = 1'b1;
        while (ok) begin
          try_send(i, 300, ok);
          if (ok) i++;
        end
      end
      idle();
      checks++;
      if (!y_stall) begin failures++; $display("no output stall"); end
      repeat (400) @(negedge clk);
      y_ready = 1'b1;
      // back up to 5 while data flow
      target_depth = 4'd5;
      repeat (150) begin send(i); i++; end
      checks++;
      if (depth != 5) begin failures++; $display("depth %0d, expected 5", depth); end
      wait_outputs(i, 40000);
      // overflow: offer a sample every cycle regardless of room
      for (int j = 0; j < 40; j++) begin
        u_valid = 1'b1; d_valid = 1'b1;
        u_data = 6'(j); d_data = '0;
        @(negedge clk);
      end
      idle();
      checks++;
      if (!u_overflow || !d_overflow) failures++;
    end

    // -------- mechanisms --------
    $display("mechanisms: add=%0d remove=%0d output_stall=%0d input_full=%0d overflow=%0d",
             n_add, n_rem, n_ystall, n_fifo_full, int'(u_overflow));
    checks++; if (n_add == 0)       begin failures++; $display("no token addition"); end
    checks++; if (n_rem == 0)       begin failures++; $display("no token removal"); end
    checks++; if (n_ystall == 0)    begin failures++; $display("no output stall"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("input FIFO never full"); end
    checks++; if (!u_overflow)      begin failures++; $display("no overflow"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
