// tb_kadane1d: self-checking testbench of the 1D stream engine.
//
// Streams the 13-word example sequence {7,-9,15,20,-37,23,4,5,19,-28,17,-2,1}
// (best run positions 5..8, sum 51) and then random streams with different
// proportions of negative words. The expected s, x1, x2 come from a
// behavioural model of Kadane's algorithm run in the testbench (best sum
// starts at 0, ties keep the earliest run). The result is also checked
// exactly two enabled clocks after the last word (pipeline latency), one
// word per clock (throughput), across a hold (en = 0) in mid-stream, and
// with a clr between streams.
module tb_kadane1d;
  localparam int unsigned DATA_W = 9;
  localparam int unsigned IDX_W  = 16;
  localparam int unsigned S_W    = DATA_W + IDX_W - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic signed [DATA_W-1:0] din = '0;
  logic [S_W-1:0]   s;
  logic [IDX_W-1:0] x1, x2, j;
  logic [S_W:0]     t;

  int checks = 0;
  int failures = 0;

  kadane1d #(.DATA_W(DATA_W), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq[$];

  // reference model
  task automatic ref_kadane(input int a[$], output longint rs, output int rx1, output int rx2);
    longint tt = 0;
    int ii = 0;
    rs = 0; rx1 = 0; rx2 = 0;
    foreach (a[k]) begin
      tt += a[k];
      if (tt > rs) begin rs = tt; rx1 = ii; rx2 = k; end
      if (tt < 0) begin tt = 0; ii = k + 1; end
    end
  endtask

  task automatic check(input string what, input longint es, input int ex1, input int ex2);
    checks++;
    if (longint'(s) != es || int'(x1) != ex1 || int'(x2) != ex2) begin
      failures++;
      $display("FAIL %s: got s=%0d x1=%0d x2=%0d, expected s=%0d x1=%0d x2=%0d",
               what, s, x1, x2, es, ex1, ex2);
    end
  endtask

  // Feed a stream one word per clock, optionally with a hold gap, then two
  // zero words; check the result exactly after the second zero word.
  task automatic run_stream(input string what, input int a[$], input int gap_at);
    longint es; int ex1, ex2;
    ref_kadane(a, es, ex1, ex2);
    @(negedge clk); clr = 1'b1; en = 1'b0;
    @(negedge clk); clr = 1'b0;
    foreach (a[k]) begin
      if (k == gap_at) begin
        en = 1'b0;
        repeat (3) @(negedge clk);
      end
      en = 1'b1; din = DATA_W'(a[k]);
      @(negedge clk);
    end
    din = '0;
    @(negedge clk);          // first flush word
    // one enabled clock short of the latency: the last word is not yet in s
    // unless it does not change the result
    @(negedge clk);          // second flush word
    en = 1'b0;
    check(what, es, ex1, ex2);
    // zero words keep the result
    en = 1'b1; din = '0;
    repeat (4) @(negedge clk);
    en = 1'b0;
    check({what, " after zeros"}, es, ex1, ex2);
  endtask

  initial begin
    int a[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // example from the description of the problem
    a = '{7, -9, 15, 20, -37, 23, 4, 5, 19, -28, 17, -2, 1};
    run_stream("example", a, -1);
    checks++;
    if (s != 51 || x1 != 5 || x2 != 8) begin failures++; $display("FAIL example literal"); end

    // latency: a stream whose last word sets the maximum
    a = '{-3, 4, -1, 100};
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    foreach (a[k]) begin en = 1'b1; din = DATA_W'(a[k]); @(negedge clk); end
    din = '0;
    @(negedge clk);          // one enabled clock after the last word
    checks++;
    if (s != 4) begin failures++; $display("FAIL latency: result early (s=%0d)", s); end
    @(negedge clk);          // two enabled clocks after the last word
    en = 1'b0;
    check("latency", 103, 1, 3);

    // all negative: nothing positive to report
    a = '{-5, -1, -200, -7};
    run_stream("all negative", a, -1);

    // hold in the middle of a stream
    a = '{10, -20, 5, 6, -2, 9, -30, 4};
    run_stream("hold", a, 4);

    // random streams
    for (int r = 0; r < 40; r++) begin
      automatic int len = 1 + int'($urandom_range(0, 600));
      automatic int bias = int'($urandom_range(0, 60));
      a = {};
      for (int k = 0; k < len; k++)
        a.push_back(int'($urandom_range(0, 511)) - 256 + bias);
      foreach (a[k]) if (a[k] > 255) a[k] = 255;
      run_stream($sformatf("random %0d", r), a, (r % 3 == 0) ? len / 2 : -1);
    end

    // extreme words
    a = {};
    for (int k = 0; k < 1000; k++) a.push_back((k % 7 == 3) ? -256 : 255);
    run_stream("extremes", a, -1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
