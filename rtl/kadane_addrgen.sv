// kadane_addrgen: address generator of the 2D engine.
//
// Two counters, the current row and the current column, and a multiplier
// plus adder that form the memory address ADR = row * N + col. The Command
// Unit steps the column counter once per word (col_adv); at the last column
// it wraps to 0 and the row counter stays put until the Command Unit either
// steps it (row_adv, next row of the same pass) or reloads it (row_load,
// first row of the next pass). In this way the rows are read in the order
// 0..M-1, 1..M-1, 2..M-1, ... , M-1.
//
// The two counters and the multiplier (a dedicated 18x18 multiplier in the
// published FPGA design; here an ordinary '*' that a synthesis tool maps to
// a DSP block or to logic) follow the published design. The control inputs
// and their priority (clr > row_load > row_adv; col_adv independent) are
// this design's own. The address is combinational from the counters.
module kadane_addrgen #(
  parameter int unsigned M     = 256,   // rows
  parameter int unsigned N     = 256,   // columns
  parameter int unsigned ROW_W = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned COL_W = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned AW    = (M * N > 1) ? $clog2(M * N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,       // row = 0, col = 0
  input  logic             col_adv,   // next column (wraps at N-1)
  input  logic             row_adv,   // next row
  input  logic             row_load,  // row = row_in, col = 0
  input  logic [ROW_W-1:0] row_in,
  output logic [AW-1:0]    addr,
  output logic [ROW_W-1:0] row,
  output logic [COL_W-1:0] col,
  output logic             last_col,
  output logic             last_row
);

  localparam logic [COL_W-1:0] COL_LAST = COL_W'(N - 1);
  localparam logic [ROW_W-1:0] ROW_LAST = ROW_W'(M - 1);

  assign last_col = (col == COL_LAST);
  assign last_row = (row == ROW_LAST);

  // multiplier and adder
  assign addr = AW'(row * AW'(N)) + AW'(col);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (clr) begin
      row <= '0;
      col <= '0;
    end else begin
      if (row_load) begin
        row <= row_in;
        col <= '0;
      end else begin
        if (row_adv) row <= row + 1'b1;
        if (col_adv) col <= last_col ? '0 : col + 1'b1;
      end
    end
  end

  a_row_range: assert property (@(posedge clk) disable iff (!rst_n) row <= ROW_LAST);
  a_col_range: assert property (@(posedge clk) disable iff (!rst_n) col <= COL_LAST);

endmodule
