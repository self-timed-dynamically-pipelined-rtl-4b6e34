// tb_dlms_depths: the equalizer at the depths and stage counts of the
// evaluated configuration: multipliers and adder array with 8 pipeline
// stages (the upper end of the 6..8 range), pipeline depth D = 4, 5, 6 and 7.
//
// For each D, after a reset, the depth is raised by token addition while zero
// samples flow, then 60 zeros and 150 random training samples are sent as
// fast as the input accepts them.  Every output is compared with the
// bit-exact reference model of the DLMS recursion at that D (the same model
// as in tb_dlms_top), and the input rate is measured in clock cycles per
// sample.  Checked: every output exact, the depth reached, and the rate not
// worse at a larger D (within 2%).  All other parameters are at their
// defaults.
module tb_dlms_depths;
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

  dlms_top #(.MULT_ST(8), .CSA_ST(8)) dut (
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

  real cps [4];

  initial begin
    mu = 9'd16;
    for (int k = 0; k < 4; k++) begin
      int D, z;
      D = 4 + k;
      do_reset();
      ref_reset(D);
      set_depth(D, 0);
      z = n_sent;
      make_data(z, 60, 1'b1);
      make_data(z + 60, 150, 1'b0);
      for (int i = 0; i < z + 210; i++) ref_step(stim_u[i], stim_d[i], 16);
      compare_on = 1; n_cmp_from = 0; n_cmp_to = z + 210;
      for (int i = z; i < z + 60; i++) send(i);
      t_first = cycle;
      for (int i = z + 60; i < z + 210; i++) send(i);
      cps[k] = real'(cycle - t_first) / 150.0;
      wait_outputs(z + 210, 40000);
      compare_on = 0;
      checks++;
      if (depth != 4'(D)) begin failures++; $display("depth %0d, expected %0d", depth, D); end
      $display("D=%0d: %0.2f cycles per sample", D, cps[k]);
    end
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (cps[k] > cps[k-1] * 1.02) begin
        failures++;
        $display("D=%0d slower than D=%0d", 4 + k, 3 + k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
