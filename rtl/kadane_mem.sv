// kadane_mem: array memory of the 2D engine (one block-RAM style array).
//
// Holds the M x N input array, row after row, one WORD_W-bit element per
// address (address = row*N + column). The read port is synchronous: the word
// at raddr appears on rdata one clock after a cycle with re = 1; with re = 0
// rdata holds its value (the HOLD of the Command Unit). The separate write
// port is how a host loads the array before a run.
//
// Keeping the array in block RAM and reading it word by word follows the
// published design; the write port and its timing are this design's own
// choice. Contents are not reset.
module kadane_mem #(
  parameter int unsigned W     = kadane_pkg::WORD_W,  // word width
  parameter int unsigned DEPTH = 65536,               // number of words
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  // host write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  // read port, driven by the address generator
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
