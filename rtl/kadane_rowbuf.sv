// kadane_rowbuf: RowBuffer of the 2D engine, a circular adding FIFO.
//
// N registers of W bits hold the column sums of the rows read so far in the
// current pass (Row_i + ... + Row_j). Each shift takes the memory word din
// (a signed DIN_W-bit element of the next row), adds it to the oldest stored
// sum and writes the result back at the tail, so after N shifts the buffer
// holds the column sums including the new row. The same sum is the output
// word that goes to the Kadane1D engine, so the two tasks of a pass (finding
// the best run of the current rows and forming the sums for the next pass)
// happen in the same clock.
//
// The adding circular organisation and the width of the words passed on
// (DIN_W + log2(M*N) bits) follow the published design. clr zeroes every
// register (used when a pass starts from a new first row); that and the
// shift enable are this design's own interface. sum is combinational from
// din and the head register; the registers change at a clock with shift = 1.
module kadane_rowbuf #(
  parameter int unsigned N     = 256,                    // columns
  parameter int unsigned DIN_W = kadane_pkg::WORD_W,     // memory word width
  parameter int unsigned W     = DIN_W + 16              // stored sum width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    shift,
  input  logic signed [DIN_W-1:0] din,
  output logic signed [W-1:0]     sum
);

  logic signed [W-1:0] buf_q [N];

  assign sum = buf_q[0] + W'(din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N); k++) buf_q[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < int'(N); k++) buf_q[k] <= '0;
    end else if (shift) begin
      for (int k = 0; k < int'(N) - 1; k++) buf_q[k] <= buf_q[k+1];
      buf_q[N-1] <= sum;
    end
  end

endmodule
