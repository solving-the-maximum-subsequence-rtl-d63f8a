// kadane2d_runner: testbench helper that runs one kadane2d of a given size.
//
// Instantiates kadane2d with M x N, fills it with a random array (elements in
// -256..255, shifted by a random positive bias so that rectangles of many
// sizes win), runs it and compares the rectangle and sum with a row-pair
// Kadane model computed here, re-adds the reported rectangle from the array
// and checks the run length of 1 + M(M+1)/2*(N+4) clocks. Reports its
// counts on its outputs and raises finished when done.
module kadane2d_runner #(
  parameter int unsigned M = 4,
  parameter int unsigned N = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int unsigned W = 9;
  localparam int unsigned ROW_W = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned COL_W = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned AW = (M * N > 1) ? $clog2(M * N) : 1;
  localparam int unsigned S_W = W + AW + COL_W - 1;

  logic we = 1'b0, start = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0] wdata = '0;
  logic busy, done;
  logic [S_W-1:0] maxs;
  logic [COL_W-1:0] x1, x2;
  logic [ROW_W-1:0] r1, r2;
  int arr [M][N];

  kadane2d #(.M(M), .N(N)) dut (.*);

  initial begin
    longint es, got;
    int ex1, ex2, er1, er2, ncyc;
    automatic int bias = int'($urandom_range(2, 20));
    checks = 0; failures = 0; finished = 1'b0;
    foreach (arr[r, c]) begin
      arr[r][c] = int'($urandom_range(0, 511)) - 256 + bias;
      if (arr[r][c] > 255) arr[r][c] = 255;
    end
    wait (rst_n);
    for (int r = 0; r < int'(M); r++)
      for (int c = 0; c < int'(N); c++) begin
        @(negedge clk); we = 1'b1; waddr = AW'(r * int'(N) + c); wdata = W'(arr[r][c]);
      end
    @(negedge clk); we = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    ncyc = 1;
    while (!done) begin @(negedge clk); ncyc++; end
    // reference: same row-pair order, Kadane on the column sums
    es = 0; ex1 = 0; ex2 = 0; er1 = 0; er2 = 0;
    for (int i = 0; i < int'(M); i++) begin
      automatic longint cs [N];
      foreach (cs[c]) cs[c] = 0;
      for (int jr = i; jr < int'(M); jr++) begin
        automatic longint t = 0, s = 0;
        automatic int st = 0, sx1 = 0, sx2 = 0;
        for (int c = 0; c < int'(N); c++) cs[c] += arr[jr][c];
        for (int c = 0; c < int'(N); c++) begin
          t += cs[c];
          if (t > s) begin s = t; sx1 = st; sx2 = c; end
          if (t < 0) begin t = 0; st = c + 1; end
        end
        if (s > es) begin es = s; ex1 = sx1; ex2 = sx2; er1 = i; er2 = jr; end
      end
    end
    checks++;
    if (longint'(maxs) != es || int'(x1) != ex1 || int'(x2) != ex2 || int'(r1) != er1 || int'(r2) != er2) begin
      failures++;
      $display("FAIL %0dx%0d: got %0d (%0d,%0d)-(%0d,%0d), expected %0d (%0d,%0d)-(%0d,%0d)",
               M, N, maxs, r1, x1, r2, x2, es, er1, ex1, er2, ex2);
    end
    got = 0;
    for (int r = int'(r1); r <= int'(r2); r++)
      for (int c = int'(x1); c <= int'(x2); c++) got += arr[r][c];
    checks++;
    if (es != 0 && got != longint'(maxs)) begin failures++; $display("FAIL %0dx%0d: rectangle sum", M, N); end
    checks++;
    if (ncyc != 1 + int'(M * (M + 1) / 2 * (N + 4))) begin
      failures++; $display("FAIL %0dx%0d: run took %0d clocks", M, N, ncyc);
    end
    $display("%0d x %0d array: sum %0d at rows %0d..%0d, columns %0d..%0d, %0d clocks",
             M, N, maxs, r1, r2, x1, x2, ncyc);
    finished = 1'b1;
  end
endmodule
