// tb_kadane2d: self-checking testbench of the 2D maximum sub-array engine.
//
// Loads a 5 x 7 array through the write port, runs the engine and compares
// the rectangle and its sum with two independent computations made here:
// the same row-pair/Kadane order (exact pointers and tie-breaking) and a
// brute-force search over every rectangle (sum only). Arrays: the 5 x 7
// example of the maximum sub-array problem, an all-negative array, an array
// whose best rectangle is the single bottom-right element, and random arrays
// with different amounts of negative elements. The run length must be
// 1 + M(M+1)/2 * (N+4) clocks from start to done.
module tb_kadane2d;
  localparam int unsigned M = 5, N = 7, W = 9;
  localparam int unsigned ROW_W = 3, COL_W = 3, AW = 6;
  localparam int unsigned S_W = W + AW + COL_W - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, start = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0] wdata = '0;
  logic busy, done;
  logic [S_W-1:0] maxs;
  logic [COL_W-1:0] x1, x2;
  logic [ROW_W-1:0] r1, r2;
  int checks = 0, failures = 0;
  int a [M][N];

  kadane2d #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // row pairs in hardware order, 1D Kadane on the column sums, strict '>'
  task automatic ref_pairs(output int es, output int ex1, output int ex2, output int er1, output int er2);
    es = 0; ex1 = 0; ex2 = 0; er1 = 0; er2 = 0;
    for (int i = 0; i < int'(M); i++) begin
      int cs [N];
      foreach (cs[c]) cs[c] = 0;
      for (int jr = i; jr < int'(M); jr++) begin
        int t = 0, s = 0, st = 0, sx1 = 0, sx2 = 0;
        for (int c = 0; c < int'(N); c++) cs[c] += a[jr][c];
        for (int c = 0; c < int'(N); c++) begin
          t += cs[c];
          if (t > s) begin s = t; sx1 = st; sx2 = c; end
          if (t < 0) begin t = 0; st = c + 1; end
        end
        if (s > es) begin es = s; ex1 = sx1; ex2 = sx2; er1 = i; er2 = jr; end
      end
    end
  endtask

  function automatic int brute_force();
    int best = 0;
    for (int r1b = 0; r1b < int'(M); r1b++)
      for (int r2b = r1b; r2b < int'(M); r2b++)
        for (int c1 = 0; c1 < int'(N); c1++)
          for (int c2 = c1; c2 < int'(N); c2++) begin
            int sm = 0;
            for (int r = r1b; r <= r2b; r++)
              for (int c = c1; c <= c2; c++) sm += a[r][c];
            if (sm > best) best = sm;
          end
    return best;
  endfunction

  function automatic int rect_sum(input int ra, input int rb, input int ca, input int cb);
    int sm = 0;
    for (int r = ra; r <= rb; r++)
      for (int c = ca; c <= cb; c++) sm += a[r][c];
    return sm;
  endfunction

  task automatic run(input string what);
    int es, ex1, ex2, er1, er2, bf, ncyc;
    for (int r = 0; r < int'(M); r++)
      for (int c = 0; c < int'(N); c++) begin
        @(negedge clk); we = 1'b1; waddr = AW'(r * int'(N) + c); wdata = W'(a[r][c]);
      end
    @(negedge clk); we = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    ncyc = 1;
    while (!done) begin @(negedge clk); ncyc++; end
    ref_pairs(es, ex1, ex2, er1, er2);
    bf = brute_force();
    checks++;
    if (int'(maxs) != es || int'(x1) != ex1 || int'(x2) != ex2 || int'(r1) != er1 || int'(r2) != er2) begin
      failures++;
      $display("FAIL %s: got %0d (%0d,%0d)-(%0d,%0d), expected %0d (%0d,%0d)-(%0d,%0d)",
               what, maxs, r1, x1, r2, x2, es, er1, ex1, er2, ex2);
    end
    checks++;
    if (int'(maxs) != bf) begin failures++; $display("FAIL %s: sum %0d, brute force %0d", what, maxs, bf); end
    checks++;
    if (bf > 0 && rect_sum(int'(r1), int'(r2), int'(x1), int'(x2)) != int'(maxs)) begin
      failures++; $display("FAIL %s: reported rectangle does not hold the reported sum", what);
    end
    checks++;
    if (ncyc != 1 + int'(M * (M + 1) / 2 * (N + 4))) begin
      failures++; $display("FAIL %s: run took %0d clocks", what, ncyc);
    end
  endtask

  initial begin
    static int fig [M][N] = '{
      '{ 2, -4,  5, -5, -9,  3, -4},
      '{-5, -6, -9,  2, -5,  4,  1},
      '{-3,  7, -7,  5,  6, -6,  0},
      '{-3,  5, -8,  8, -2,  2, -7},
      '{-4,  1, -1,  0, -1, -4,  1}};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    a = fig;
    run("example array");
    // the best rectangle of the example: rows 2..3, columns 3..4, sum 17
    checks++;
    if (maxs != 17 || r1 != 2 || r2 != 3 || x1 != 3 || x2 != 4) begin
      failures++; $display("FAIL example literal: %0d (%0d,%0d)-(%0d,%0d)", maxs, r1, x1, r2, x2);
    end

    foreach (a[r, c]) a[r][c] = -1 - int'($urandom_range(0, 255));
    run("all negative");

    foreach (a[r, c]) a[r][c] = -1;
    a[M-1][N-1] = 3;
    run("bottom-right corner");

    for (int k = 0; k < 25; k++) begin
      automatic int bias = int'($urandom_range(0, 100));
      foreach (a[r, c]) begin
        a[r][c] = int'($urandom_range(0, 511)) - 256 + bias;
        if (a[r][c] > 255) a[r][c] = 255;
      end
      run($sformatf("random %0d", k));
    end

    foreach (a[r, c]) a[r][c] = 255;
    run("all maximum");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
