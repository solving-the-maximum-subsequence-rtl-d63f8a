// tb_kadane_workloads: the problem sizes used to evaluate the design.
//
// 1D: streams of 10,000, 20,000, 30,000, 60,000 and 65,536 words through
// the full-size 1D engine, each checked against a Kadane model and each
// taking exactly one clock per word plus two clocks of latency.
// 2D: random square arrays of 4, 16, 64, 128 and 170 rows and columns, one
// kadane2d per size running concurrently (see kadane2d_runner). Larger
// sizes of the same evaluation (512 and up) exceed the 256 x 256 default.
module tb_kadane_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ 1D
  logic clr = 1'b0, en = 1'b0;
  logic signed [8:0] din = '0;
  logic [23:0] s;
  logic [15:0] x1, x2, j;
  logic [24:0] t;
  bit done1 = 1'b0;

  kadane1d u_1d (.clk, .rst_n, .clr, .en, .din, .s, .x1, .x2, .t, .j);

  initial begin
    static int lens [5] = '{10000, 20000, 30000, 60000, 65536};
    wait (rst_n);
    foreach (lens[n]) begin
      int a[$];
      longint tt, es;
      int ii, ex1, ex2, ncyc;
      a = {};
      for (int k = 0; k < lens[n]; k++) begin
        a.push_back(int'($urandom_range(0, 511)) - 256 + 2);
        if (a[k] > 255) a[k] = 255;
      end
      tt = 0; ii = 0; es = 0; ex1 = 0; ex2 = 0;
      foreach (a[k]) begin
        tt += a[k];
        if (tt > es) begin es = tt; ex1 = ii; ex2 = k; end
        if (tt < 0) begin tt = 0; ii = k + 1; end
      end
      @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
      ncyc = 0;
      foreach (a[k]) begin en = 1'b1; din = 9'(a[k]); @(negedge clk); ncyc++; end
      din = '0;
      repeat (2) begin @(negedge clk); ncyc++; end
      en = 1'b0;
      checks++;
      if (longint'(s) != es || int'(x1) != ex1 || int'(x2) != ex2 || ncyc != lens[n] + 2) begin
        failures++;
        $display("FAIL stream %0d: got %0d [%0d..%0d] after %0d clocks, expected %0d [%0d..%0d]",
                 lens[n], s, x1, x2, ncyc, es, ex1, ex2);
      end
      $display("%0d-word stream: sum %0d at %0d..%0d, %0d clocks", lens[n], s, x1, x2, ncyc);
    end
    done1 = 1'b1;
  end

  // ------------------------------------------------------------------ 2D
  int c4, f4, c16, f16, c64, f64, c128, f128, c170, f170;
  bit d4, d16, d64, d128, d170;
  kadane2d_runner #(.M(4),   .N(4))   u_4   (.clk, .rst_n, .checks(c4),   .failures(f4),   .finished(d4));
  kadane2d_runner #(.M(16),  .N(16))  u_16  (.clk, .rst_n, .checks(c16),  .failures(f16),  .finished(d16));
  kadane2d_runner #(.M(64),  .N(64))  u_64  (.clk, .rst_n, .checks(c64),  .failures(f64),  .finished(d64));
  kadane2d_runner #(.M(128), .N(128)) u_128 (.clk, .rst_n, .checks(c128), .failures(f128), .finished(d128));
  kadane2d_runner #(.M(170), .N(170)) u_170 (.clk, .rst_n, .checks(c170), .failures(f170), .finished(d170));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done1 && d4 && d16 && d64 && d128 && d170);
    checks += c4 + c16 + c64 + c128 + c170;
    failures += f4 + f16 + f64 + f128 + f170;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
