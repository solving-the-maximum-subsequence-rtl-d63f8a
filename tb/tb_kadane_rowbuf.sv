// tb_kadane_rowbuf: self-checking testbench of the RowBuffer.
//
// For a 6 x 9 random array, performs the passes of the 2D engine (rows i..j
// accumulated, buffer cleared when a new first row starts) with gaps in the
// shifting, and checks every output word against the column sums of rows
// i..j computed here.
module tb_kadane_rowbuf;
  localparam int unsigned M = 6, N = 9, DIN_W = 9, W = 15;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift = 1'b0;
  logic signed [DIN_W-1:0] din = '0;
  logic signed [W-1:0] sum;
  int checks = 0, failures = 0;
  int a [M][N];

  kadane_rowbuf #(.N(N), .DIN_W(DIN_W), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < int'(M); r++)
      for (int c = 0; c < int'(N); c++)
        a[r][c] = int'($urandom_range(0, 511)) - 256;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(M); i++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      for (int jr = i; jr < int'(M); jr++) begin
        for (int c = 0; c < int'(N); c++) begin
          automatic int exp_sum = 0;
          for (int r = i; r <= jr; r++) exp_sum += a[r][c];
          shift = 1'b1; din = DIN_W'(a[jr][c]);
          #1;
          checks++;
          if (int'(sum) != exp_sum) begin
            failures++;
            $display("FAIL i=%0d j=%0d c=%0d: got %0d expected %0d", i, jr, c, sum, exp_sum);
          end
          @(negedge clk);
          if (c == 3) begin shift = 1'b0; din = '0; repeat (2) @(negedge clk); end
        end
        shift = 1'b0;
        repeat (3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
