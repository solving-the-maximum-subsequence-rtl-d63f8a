// kadane1d: streaming maximum-subsequence engine (Kadane's algorithm).
//
// One signed word enters per enabled clock. The engine keeps the running
// partial sum t, the best sum s found so far and the positions x1..x2 of the
// subsequence that produced it (0 = first word after clear).
//
// Datapath, in the order a word travels through it:
//   input buffer  a_buf <= din
//   sign extension of a_buf to ACC_W bits, adder  sum = t + a_buf
//   accumulator   t <= (sum < 0) ? 0 : sum     (synchronous reset of t)
//   comparator    t > s  ->  s <= t, x1 <= i, x2 <= j
//   counter       j counts words; it starts at 2**IDX_W - 2
//   +2 block      i <= j + 2 when the adder result is negative
// Because the sign of the adder result is known before the accumulator
// loads it, t is cleared at the same edge instead of one iteration later, and
// at that edge the counter still reads one less than the position of the
// word in the adder; hence the start of the next candidate run is j + 2.
// The counter start value makes j equal the position of the word whose sum
// sits in t, so the comparator stage stores x2 <= j directly. t never holds a
// negative value, so s and the comparator drop the sign bit (S_W = ACC_W-1).
//
// These structures, widths and initial values follow the published design.
// Own choices: s starts at 0 rather than minus infinity, so only strictly
// positive sums are reported (an all-negative stream reports s = 0, x1 = x2
// = 0); ties keep the earliest subsequence; en is a clock enable that freezes
// every register (the HOLD of the 2D system); clr is a synchronous
// re-initialisation.
//
// Timing: the word sampled at enabled edge k is reflected in s/x1/x2 after
// enabled edge k+2. To read the final result of a stream, give two more
// enabled clocks with din = 0 (a zero word never changes s, x1 or x2).
module kadane1d #(
  parameter int unsigned DATA_W = kadane_pkg::WORD_W,        // input word width
  parameter int unsigned IDX_W  = kadane_pkg::STREAM_IDX_W,  // position width
  parameter int unsigned ACC_W  = DATA_W + IDX_W,            // accumulator t
  parameter int unsigned S_W    = ACC_W - 1                  // best sum s
) (
  input  logic                     clk,
  input  logic                     rst_n,   // asynchronous, active low
  input  logic                     clr,     // synchronous re-initialisation
  input  logic                     en,      // advance one word
  input  logic signed [DATA_W-1:0] din,     // two's-complement input word
  output logic        [S_W-1:0]    s,       // best (maximal) sum
  output logic        [IDX_W-1:0]  x1,      // first position of best run
  output logic        [IDX_W-1:0]  x2,      // last position of best run
  output logic        [ACC_W-1:0]  t,       // partial sum (never negative)
  output logic        [IDX_W-1:0]  j        // position of the word in t
);

  localparam logic [IDX_W-1:0] J_INIT = IDX_W'(0) - IDX_W'(kadane_pkg::CNT_START_OFFSET);

  logic signed [DATA_W-1:0] a_buf;
  logic        [IDX_W-1:0]  i;
  logic signed [ACC_W-1:0]  sum;
  logic                     sum_neg;
  logic                     better;

  // sign extension (wiring) and adder
  assign sum     = $signed(t) + ACC_W'(a_buf);
  assign sum_neg = sum[ACC_W-1];
  // comparator: t is never negative, so its sign bit is not compared
  assign better  = t[S_W-1:0] > s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_buf <= '0;
      t     <= '0;
      s     <= '0;
      i     <= '0;
      x1    <= '0;
      x2    <= '0;
      j     <= J_INIT;
    end else if (clr) begin
      a_buf <= '0;
      t     <= '0;
      s     <= '0;
      i     <= '0;
      x1    <= '0;
      x2    <= '0;
      j     <= J_INIT;
    end else if (en) begin
      a_buf <= din;
      j     <= j + 1'b1;
      if (sum_neg) begin
        t <= '0;
        i <= j + IDX_W'(2);
      end else begin
        t <= sum;
      end
      if (better) begin
        s  <= t[S_W-1:0];
        x1 <= i;
        x2 <= j;
      end
    end
  end

  // The accumulator is cleared instead of loading a negative sum.
  a_t_nonneg: assert property (@(posedge clk) disable iff (!rst_n) !t[ACC_W-1]);
  // A stored best run never ends before it starts.
  a_x_order: assert property (@(posedge clk) disable iff (!rst_n) (s == '0) || (x1 <= x2));

endmodule
