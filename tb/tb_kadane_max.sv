// tb_kadane_max: self-checking testbench of the MAX unit.
//
// Presents random Kadane1D results with row pairs and checks that MAX keeps
// the strictly largest sum with the pointers that came with it (the first of
// equal sums), ignores inputs without a load strobe and clears on clr.
module tb_kadane_max;
  localparam int unsigned S_W = 20, X_W = 6, ROW_W = 5;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0;
  logic [S_W-1:0] s_in = '0, maxs;
  logic [X_W-1:0] x1_in = '0, x2_in = '0, x1, x2;
  logic [ROW_W-1:0] r1_in = '0, r2_in = '0, r1, r2;
  int checks = 0, failures = 0;

  kadane_max #(.S_W(S_W), .X_W(X_W), .ROW_W(ROW_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es, ex1, ex2, er1, er2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      es = 0; ex1 = 0; ex2 = 0; er1 = 0; er2 = 0;
      for (int k = 0; k < 300; k++) begin
        load = ($urandom_range(0, 3) != 0);
        s_in = S_W'($urandom_range(0, 2000 + 300 * k));
        if (k % 17 == 5) s_in = S_W'(es);          // equal sum: must not replace
        x1_in = X_W'($urandom); x2_in = X_W'($urandom);
        r1_in = ROW_W'($urandom); r2_in = ROW_W'($urandom);
        if (load && int'(s_in) > es) begin
          es = int'(s_in); ex1 = int'(x1_in); ex2 = int'(x2_in); er1 = int'(r1_in); er2 = int'(r2_in);
        end
        @(negedge clk);
        checks++;
        if (int'(maxs) != es || int'(x1) != ex1 || int'(x2) != ex2 || int'(r1) != er1 || int'(r2) != er2) begin
          failures++;
          $display("FAIL round %0d step %0d: maxs=%0d expected %0d", round, k, maxs, es);
        end
      end
      load = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
