// tb_kadane_addrgen: self-checking testbench of the address generator.
//
// Drives the control sequence the Command Unit uses (N column steps per row,
// then a row step or a reload of the next first row) for a 5 x 7 array and
// checks every address against row*N + col computed here, the wrap of the
// column counter and the last_col/last_row flags. A second instance with a
// non-power-of-two size checks the multiplier more widely.
module tb_kadane_addrgen;
  localparam int unsigned M = 5, N = 7;
  localparam int unsigned ROW_W = 3, COL_W = 3, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, col_adv = 1'b0, row_adv = 1'b0, row_load = 1'b0;
  logic [ROW_W-1:0] row_in = '0, row;
  logic [COL_W-1:0] col;
  logic [AW-1:0] addr;
  logic last_col, last_row;
  int checks = 0, failures = 0;

  kadane_addrgen #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int passes = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    for (int i = 0; i < int'(M); i++) begin
      for (int jr = i; jr < int'(M); jr++) begin
        for (int c = 0; c < int'(N); c++) begin
          col_adv = 1'b1;
          #1;
          checks++;
          if (int'(addr) != jr * int'(N) + c || int'(row) != jr || int'(col) != c ||
              last_col != (c == int'(N) - 1) || last_row != (jr == int'(M) - 1)) begin
            failures++;
            $display("FAIL i=%0d j=%0d c=%0d: addr=%0d row=%0d col=%0d", i, jr, c, addr, row, col);
          end
          @(negedge clk);
        end
        col_adv = 1'b0;
        checks++;
        if (col != 0) begin failures++; $display("FAIL column did not wrap"); end
        if (jr < int'(M) - 1) row_adv = 1'b1;
        else if (i < int'(M) - 1) begin row_load = 1'b1; row_in = ROW_W'(i + 1); end
        @(negedge clk);
        row_adv = 1'b0; row_load = 1'b0;
        passes++;
      end
    end
    checks++;
    if (passes != int'(M * (M + 1) / 2)) begin failures++; $display("FAIL pass count"); end
    // clr from the middle of a row
    col_adv = 1'b1; repeat (3) @(negedge clk); col_adv = 1'b0;
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    checks++;
    if (addr != 0 || row != 0 || col != 0) begin failures++; $display("FAIL clr"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
