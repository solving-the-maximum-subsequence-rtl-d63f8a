// tb_kadane_top_full: kadane_top at its default sizes, one complete
// operation of each engine: two 65,536-word streams through the 1D engine
// (one of them all +255, the largest sum the 25-bit accumulator must hold)
// and one search of a random 256 x 256 array by the 2D engine.
// Otherwise the same checks as tb_kadane_top:
//
// 1D engine: streams of signed words, one per clock, some with a hold in the
// middle, each ended by two zero words; s, x1, x2 are compared with a
// Kadane model in the testbench. 2D engine (M x N = 256 x 256):
// random arrays are loaded, the engine is started, and the rectangle is
// compared with a row-pair model and its sum re-added from the array; the
// run length must be 1 + M(M+1)/2*(N+4) clocks. Both engines work at the
// same time.
//
// Every mechanism of the design is counted and must occur: accumulator
// cleared on a negative sum and new best sum stored (in both engines), hold
// of the stream, clear between streams, RowBuffer cleared at a new first
// row, hold while Kadane1D drains, MAX replacing and MAX keeping its result.
module tb_kadane_top_full;
  localparam int unsigned IDX_W = 16, M = 256, N = 256, W = 9;
  localparam int unsigned S1_W = W + IDX_W - 1;
  localparam int unsigned ROW_W = $clog2(M), COL_W = $clog2(N), AW = $clog2(M * N);
  localparam int unsigned S2_W = W + AW + COL_W - 1;
  localparam int unsigned STREAMS = 2, MAX_LEN = 65536, ARRAYS = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s1_clr = 1'b0, s1_en = 1'b0;
  logic signed [W-1:0] s1_din = '0;
  logic [S1_W-1:0] s1_s;
  logic [IDX_W-1:0] s1_x1, s1_x2;
  logic s2_we = 1'b0, s2_start = 1'b0;
  logic [AW-1:0] s2_waddr = '0;
  logic [W-1:0] s2_wdata = '0;
  logic s2_busy, s2_done;
  logic [S2_W-1:0] s2_maxs;
  logic [COL_W-1:0] s2_x1, s2_x2;
  logic [ROW_W-1:0] s2_r1, s2_r2;

  int checks = 0, failures = 0;
  bit done1 = 1'b0, done2 = 1'b0;

  kadane_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int n_acc_reset_1d, n_new_best_1d, n_hold_1d, n_clr_1d;
  int n_acc_reset_2d, n_new_best_2d, n_rowbuf_clr, n_drain, n_max_replace, n_max_keep;

  always @(posedge clk) if (rst_n) begin
    if (s1_en && !s1_clr && dut.u_1d.sum_neg) n_acc_reset_1d++;
    if (s1_en && !s1_clr && dut.u_1d.better) n_new_best_1d++;
    if (s1_clr) n_clr_1d++;
    if (dut.u_2d.k_en && !dut.u_2d.k_clr && dut.u_2d.u_k1d.sum_neg) n_acc_reset_2d++;
    if (dut.u_2d.k_en && !dut.u_2d.k_clr && dut.u_2d.u_k1d.better) n_new_best_2d++;
    if (dut.u_2d.u_cmd.row_load && dut.u_2d.rb_clr) n_rowbuf_clr++;
    if (dut.u_2d.u_cmd.state == kadane_pkg::CMD_DRAIN) n_drain++;
    if (dut.u_2d.max_load) begin
      if (dut.u_2d.k_s > s2_maxs) n_max_replace++;
      else n_max_keep++;
    end
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- 1D side
  task automatic ref1d(input int a[$], output longint rs, output int rx1, output int rx2);
    longint tt = 0;
    int ii = 0;
    rs = 0; rx1 = 0; rx2 = 0;
    foreach (a[k]) begin
      tt += a[k];
      if (tt > rs) begin rs = tt; rx1 = ii; rx2 = k; end
      if (tt < 0) begin tt = 0; ii = k + 1; end
    end
  endtask

  task automatic stream1d(input string what, input int a[$], input int gap_at);
    longint es; int ex1, ex2;
    ref1d(a, es, ex1, ex2);
    @(negedge clk); s1_clr = 1'b1; s1_en = 1'b0;
    @(negedge clk); s1_clr = 1'b0;
    foreach (a[k]) begin
      if (k == gap_at) begin
        s1_en = 1'b0;
        repeat (5) begin @(negedge clk); n_hold_1d++; end
      end
      s1_en = 1'b1; s1_din = W'(a[k]);
      @(negedge clk);
    end
    s1_din = '0;
    repeat (2) @(negedge clk);
    s1_en = 1'b0;
    checks++;
    if (longint'(s1_s) != es || int'(s1_x1) != ex1 || int'(s1_x2) != ex2) begin
      failures++;
      $display("FAIL 1D %s: got %0d [%0d..%0d], expected %0d [%0d..%0d]",
               what, s1_s, s1_x1, s1_x2, es, ex1, ex2);
    end
  endtask

  initial begin : side_1d
    int a[$];
    wait (rst_n);
    for (int r = 0; r < int'(STREAMS); r++) begin
      automatic int len = int'(MAX_LEN);
      automatic int bias = int'($urandom_range(0, 40));
      a = {};
      for (int k = 0; k < len; k++) begin
        a.push_back(int'($urandom_range(0, 511)) - 256 + bias);
        if (a[k] > 255 || r == 0) a[k] = 255;
      end
      stream1d($sformatf("stream %0d", r), a, (r % 2 == 0) ? len / 2 : -1);
    end
    done1 = 1'b1;
  end

  // ---------------------------------------------------------------- 2D side
  int arr [M][N];

  task automatic ref2d(output longint es, output int ex1, output int ex2, output int er1, output int er2);
    es = 0; ex1 = 0; ex2 = 0; er1 = 0; er2 = 0;
    for (int i = 0; i < int'(M); i++) begin
      longint cs [N];
      foreach (cs[c]) cs[c] = 0;
      for (int jr = i; jr < int'(M); jr++) begin
        longint t = 0, s = 0;
        int st = 0, sx1 = 0, sx2 = 0;
        for (int c = 0; c < int'(N); c++) cs[c] += arr[jr][c];
        for (int c = 0; c < int'(N); c++) begin
          t += cs[c];
          if (t > s) begin s = t; sx1 = st; sx2 = c; end
          if (t < 0) begin t = 0; st = c + 1; end
        end
        if (s > es) begin es = s; ex1 = sx1; ex2 = sx2; er1 = i; er2 = jr; end
      end
    end
  endtask

  task automatic array2d(input string what);
    longint es, got_sum; int ex1, ex2, er1, er2, ncyc;
    for (int r = 0; r < int'(M); r++)
      for (int c = 0; c < int'(N); c++) begin
        @(negedge clk); s2_we = 1'b1; s2_waddr = AW'(r * int'(N) + c); s2_wdata = W'(arr[r][c]);
      end
    @(negedge clk); s2_we = 1'b0; s2_start = 1'b1;
    @(negedge clk); s2_start = 1'b0;
    ncyc = 1;
    while (!s2_done) begin @(negedge clk); ncyc++; end
    ref2d(es, ex1, ex2, er1, er2);
    checks++;
    if (longint'(s2_maxs) != es || int'(s2_x1) != ex1 || int'(s2_x2) != ex2 ||
        int'(s2_r1) != er1 || int'(s2_r2) != er2) begin
      failures++;
      $display("FAIL 2D %s: got %0d (%0d,%0d)-(%0d,%0d), expected %0d (%0d,%0d)-(%0d,%0d)",
               what, s2_maxs, s2_r1, s2_x1, s2_r2, s2_x2, es, er1, ex1, er2, ex2);
    end
    got_sum = 0;
    for (int r = int'(s2_r1); r <= int'(s2_r2); r++)
      for (int c = int'(s2_x1); c <= int'(s2_x2); c++) got_sum += arr[r][c];
    expect_true(es == 0 || got_sum == longint'(s2_maxs), {"2D ", what, ": rectangle sum"});
    expect_true(ncyc == 1 + int'(M * (M + 1) / 2 * (N + 4)),
                $sformatf("2D %s: run length %0d clocks", what, ncyc));
  endtask

  initial begin : side_2d
    wait (rst_n);
    for (int k = 0; k < int'(ARRAYS); k++) begin
      automatic int bias = int'($urandom_range(0, 80));
      foreach (arr[r, c]) begin
        arr[r][c] = int'($urandom_range(0, 511)) - 256 + bias;
        if (arr[r][c] > 255) arr[r][c] = 255;
      end
      array2d($sformatf("array %0d", k));
    end
    done2 = 1'b1;
  end

  // ---------------------------------------------------------------- end
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done1 && done2);
    @(negedge clk);
    expect_true(n_acc_reset_1d > 0, "1D accumulator cleared on a negative sum");
    expect_true(n_new_best_1d > 0, "1D new best sum stored");
    expect_true(n_hold_1d > 0, "1D stream held");
    expect_true(n_clr_1d > 0, "1D cleared between streams");
    expect_true(n_acc_reset_2d > 0, "2D Kadane1D accumulator cleared on a negative sum");
    expect_true(n_new_best_2d > 0, "2D Kadane1D new best sum stored");
    expect_true(n_rowbuf_clr > 0, "RowBuffer cleared at a new first row");
    expect_true(n_drain > 0, "hold while Kadane1D drains");
    expect_true(n_max_replace > 0, "MAX replaced its result");
    expect_true(n_max_keep > 0, "MAX kept its result");
    $display("mechanisms: 1D acc-clear=%0d new-best=%0d hold=%0d clr=%0d; 2D acc-clear=%0d new-best=%0d rowbuf-clear=%0d drain=%0d max-replace=%0d max-keep=%0d",
             n_acc_reset_1d, n_new_best_1d, n_hold_1d, n_clr_1d, n_acc_reset_2d, n_new_best_2d,
             n_rowbuf_clr, n_drain, n_max_replace, n_max_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
