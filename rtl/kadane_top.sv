// kadane_top: the two maximum-sum engines side by side.
//
//  * 1D stream engine (kadane1d at its full size): signed 9-bit words arrive
//    one per clock on s1_din; s1_s is the largest sum of a contiguous run so
//    far and s1_x1..s1_x2 its positions, for streams of up to 65,536 words.
//  * 2D array engine (kadane2d, M x N = 256 x 256 by default): the array is
//    loaded through the write port, a start pulse runs the search over all
//    row pairs, and s2_* give the rectangle of maximal sum.
// The two engines share only the clock and reset. See kadane1d and kadane2d
// for their timing.
module kadane_top #(
  parameter int unsigned IDX_W  = kadane_pkg::STREAM_IDX_W,  // 1D stream length 2**IDX_W
  parameter int unsigned M      = 256,                       // 2D rows
  parameter int unsigned N      = 256,                       // 2D columns
  localparam int unsigned W       = kadane_pkg::WORD_W,
  localparam int unsigned S1_W    = W + IDX_W - 1,
  localparam int unsigned ROW_W   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned COL_W   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW      = (M * N > 1) ? $clog2(M * N) : 1,
  localparam int unsigned S2_W    = W + AW + COL_W - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // 1D stream engine
  input  logic                s1_clr,
  input  logic                s1_en,
  input  logic signed [W-1:0] s1_din,
  output logic [S1_W-1:0]     s1_s,
  output logic [IDX_W-1:0]    s1_x1,
  output logic [IDX_W-1:0]    s1_x2,
  // 2D array engine
  input  logic                s2_we,
  input  logic [AW-1:0]       s2_waddr,
  input  logic [W-1:0]        s2_wdata,
  input  logic                s2_start,
  output logic                s2_busy,
  output logic                s2_done,
  output logic [S2_W-1:0]     s2_maxs,
  output logic [COL_W-1:0]    s2_x1,
  output logic [COL_W-1:0]    s2_x2,
  output logic [ROW_W-1:0]    s2_r1,
  output logic [ROW_W-1:0]    s2_r2
);

  logic [S1_W:0]    s1_t;
  logic [IDX_W-1:0] s1_j;

  kadane1d #(.DATA_W(W), .IDX_W(IDX_W)) u_1d (
    .clk, .rst_n, .clr(s1_clr), .en(s1_en), .din(s1_din),
    .s(s1_s), .x1(s1_x1), .x2(s1_x2), .t(s1_t), .j(s1_j)
  );

  kadane2d #(.M(M), .N(N), .DATA_W(W)) u_2d (
    .clk, .rst_n, .we(s2_we), .waddr(s2_waddr), .wdata(s2_wdata),
    .start(s2_start), .busy(s2_busy), .done(s2_done),
    .maxs(s2_maxs), .x1(s2_x1), .x2(s2_x2), .r1(s2_r1), .r2(s2_r2)
  );

endmodule
