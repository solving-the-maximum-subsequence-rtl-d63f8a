// kadane2d: maximum sub-array engine for an M x N array of signed words.
//
// The 2D problem is reduced to 1D problems: for every pair of rows i <= j the
// column sums of rows i..j form a stream of N words, and the best run x1..x2
// of that stream, over all pairs, is the best rectangle (i, x1)-(j, x2).
// Hardware:
//   kadane_mem      the array, read one word per clock
//   kadane_addrgen  row/column counters and a multiplier: ADR = row*N + col
//   kadane_rowbuf   circular adding FIFO: Row_i + ... + Row_j column sums
//   kadane1d        the 1D engine, with a wider input word
//   kadane_max      best result over all row pairs
//   kadane_cmd      Command Unit FSM: sequencing, hold, resets
// Rows are read in the order 0..M-1, 1..M-1, ..., M-1. Each row read adds
// into the RowBuffer and feeds the new column sums to Kadane1D in the same
// clock.
//
// The structure and the Kadane1D input width of DATA_W + log2(M*N) bits
// follow the published design; the default array size M = N = 256 (the
// 65,536-word size the 1D engine was built for) and the load/start/done
// interface are this design's own choices.
//
// Interface: load the array through we/waddr/wdata (address row*N + col)
// while idle, pulse start, wait for done; maxs, x1, x2, r1, r2 then hold the
// result. A run takes 1 + M(M+1)/2 * (N+4) clocks.
module kadane2d #(
  parameter int unsigned M      = 256,                 // rows
  parameter int unsigned N      = 256,                 // columns
  parameter int unsigned DATA_W = kadane_pkg::WORD_W,  // element width
  parameter int unsigned ROW_W  = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned COL_W  = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned AW     = (M * N > 1) ? $clog2(M * N) : 1,
  parameter int unsigned SUM_W  = DATA_W + AW,         // Kadane1D input width
  parameter int unsigned ACC_W  = SUM_W + COL_W,       // Kadane1D accumulator
  parameter int unsigned S_W    = ACC_W - 1            // best-sum width
) (
  input  logic              clk,
  input  logic              rst_n,
  // array load port
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  // run control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // result: rectangle (r1, x1) .. (r2, x2) with sum maxs
  output logic [S_W-1:0]    maxs,
  output logic [COL_W-1:0]  x1,
  output logic [COL_W-1:0]  x2,
  output logic [ROW_W-1:0]  r1,
  output logic [ROW_W-1:0]  r2
);

  import kadane_pkg::*;

  cmd_state_t        state;
  logic              agen_clr, col_adv, row_adv, row_load;
  logic [ROW_W-1:0]  row_in, row, cmd_r1;
  logic [COL_W-1:0]  col;
  logic              last_col, last_row;
  logic [AW-1:0]     raddr;
  logic              mem_re;
  logic [DATA_W-1:0] rdata;
  logic              rb_clr, rb_shift;
  logic signed [SUM_W-1:0] rb_sum;
  logic              k_clr, k_en;
  logic signed [SUM_W-1:0] k_din;
  logic [S_W-1:0]    k_s;
  logic [COL_W-1:0]  k_x1, k_x2, k_j;
  logic [ACC_W-1:0]  k_t;
  logic              max_clr, max_load;

  kadane_cmd #(.M(M), .ROW_W(ROW_W)) u_cmd (
    .clk, .rst_n, .start, .last_col, .row,
    .state, .busy, .done,
    .agen_clr, .col_adv, .row_adv, .row_load, .row_in,
    .mem_re, .rb_clr, .rb_shift, .k_clr, .k_en,
    .max_clr, .max_load, .r1(cmd_r1)
  );

  kadane_addrgen #(.M(M), .N(N), .ROW_W(ROW_W), .COL_W(COL_W), .AW(AW)) u_agen (
    .clk, .rst_n, .clr(agen_clr), .col_adv, .row_adv, .row_load, .row_in,
    .addr(raddr), .row, .col, .last_col, .last_row
  );

  kadane_mem #(.W(DATA_W), .DEPTH(M * N), .AW(AW)) u_mem (
    .clk, .we, .waddr, .wdata, .re(mem_re), .raddr, .rdata
  );

  kadane_rowbuf #(.N(N), .DIN_W(DATA_W), .W(SUM_W)) u_rowbuf (
    .clk, .rst_n, .clr(rb_clr), .shift(rb_shift), .din(rdata), .sum(rb_sum)
  );

  // Outside a row Kadane1D sees zero words, which never change its result,
  // so its registers still describe the row when MAX takes them.
  assign k_din = rb_shift ? rb_sum : '0;

  kadane1d #(.DATA_W(SUM_W), .IDX_W(COL_W), .ACC_W(ACC_W), .S_W(S_W)) u_k1d (
    .clk, .rst_n, .clr(k_clr), .en(k_en), .din(k_din),
    .s(k_s), .x1(k_x1), .x2(k_x2), .t(k_t), .j(k_j)
  );

  kadane_max #(.S_W(S_W), .X_W(COL_W), .ROW_W(ROW_W)) u_max (
    .clk, .rst_n, .clr(max_clr), .load(max_load),
    .s_in(k_s), .x1_in(k_x1), .x2_in(k_x2), .r1_in(cmd_r1), .r2_in(row),
    .maxs, .x1, .x2, .r1, .r2
  );

  // The array may only be loaded while no run is in progress.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) we |-> !busy);

endmodule
