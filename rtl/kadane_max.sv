// kadane_max: MAX unit of the 2D engine.
//
// At each load strobe it compares the best sum s_in that Kadane1D found for
// the current row pair with the best sum kept so far, and if the new one is
// strictly larger it stores it together with its column pointers x1, x2 and
// the first and last rows r1, r2 of the pair. The stored values are the
// result of the whole engine: the rectangle from (r1, x1) to (r2, x2).
//
// What MAX keeps follows the published design. Own choices: the kept sum
// starts at 0 (so, like kadane1d, only strictly positive sums are reported);
// a tie keeps the earlier row pair; clr re-initialises. Outputs are
// registers and change one clock after the load strobe.
module kadane_max #(
  parameter int unsigned S_W   = 32,
  parameter int unsigned X_W   = 8,
  parameter int unsigned ROW_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             load,
  input  logic [S_W-1:0]   s_in,
  input  logic [X_W-1:0]   x1_in,
  input  logic [X_W-1:0]   x2_in,
  input  logic [ROW_W-1:0] r1_in,
  input  logic [ROW_W-1:0] r2_in,
  output logic [S_W-1:0]   maxs,
  output logic [X_W-1:0]   x1,
  output logic [X_W-1:0]   x2,
  output logic [ROW_W-1:0] r1,
  output logic [ROW_W-1:0] r2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      maxs <= '0;
      x1   <= '0;
      x2   <= '0;
      r1   <= '0;
      r2   <= '0;
    end else if (clr) begin
      maxs <= '0;
      x1   <= '0;
      x2   <= '0;
      r1   <= '0;
      r2   <= '0;
    end else if (load && (s_in > maxs)) begin
      maxs <= s_in;
      x1   <= x1_in;
      x2   <= x2_in;
      r1   <= r1_in;
      r2   <= r2_in;
    end
  end

endmodule
