// kadane_cmd: Command Unit of the 2D engine, a small FSM.
//
// One pass streams one row, Row_j, out of the memory: the column counter
// advances once per clock (RUN, N clocks), the memory word arrives one clock
// later and is shifted into the RowBuffer and into Kadane1D together. Then
// the memory, address generator and RowBuffer are held (DRAIN) while
// Kadane1D is fed zero words until its two-stage pipeline has absorbed the
// last element (one clock of memory latency plus two pipeline clocks). In
// UPDATE the Kadane1D result is handed to MAX with the row pair (i, j), and
// Kadane1D is cleared. If j is the last row, the RowBuffer is cleared and the
// next pass starts with j = i = i+1; otherwise j steps to j+1 and the
// RowBuffer keeps accumulating. After the pass (M-1, M-1) the FSM stops in
// DONE until the next start.
//
// The state sequence (load a row, hold while Kadane1D finishes, transfer to
// MAX, reset the RowBuffer at the last row) follows the published state
// diagram. The exact number of hold cycles, the zero feeding and the
// start/done handshake are this design's own. One pass takes N+4 clocks; a
// whole run 1 + M(M+1)/2 * (N+4) clocks from the start strobe to done.
//
// Outputs are combinational from the state, except rb_shift, which is
// mem_re delayed by one clock (memory read latency).
module kadane_cmd
  import kadane_pkg::*;
#(
  parameter int unsigned M     = 256,
  parameter int unsigned ROW_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,      // begin a run (IDLE or DONE)
  input  logic             last_col,   // from the address generator
  input  logic [ROW_W-1:0] row,        // current row j from the address generator
  output cmd_state_t       state,
  output logic             busy,
  output logic             done,
  // address generator
  output logic             agen_clr,
  output logic             col_adv,
  output logic             row_adv,
  output logic             row_load,
  output logic [ROW_W-1:0] row_in,
  // memory
  output logic             mem_re,
  // RowBuffer
  output logic             rb_clr,
  output logic             rb_shift,   // memory word valid this clock
  // Kadane1D
  output logic             k_clr,
  output logic             k_en,
  // MAX
  output logic             max_clr,
  output logic             max_load,
  output logic [ROW_W-1:0] r1         // first row i of the pass (last row j is 'row')
);

  localparam logic [ROW_W-1:0] ROW_LAST = ROW_W'(M - 1);

  cmd_state_t  state_d;
  logic [ROW_W-1:0] first_row;      // i: first row of the current pass
  logic [1:0]  drain_cnt;
  logic        drain_last;
  logic        pass_last_row;

  assign drain_last    = (drain_cnt == 2'(DRAIN_CYCLES - 1));
  assign pass_last_row = (row == ROW_LAST);

  always_comb begin
    state_d = state;
    unique case (state)
      CMD_IDLE, CMD_DONE: if (start) state_d = CMD_RUN;
      CMD_RUN:            if (last_col) state_d = CMD_DRAIN;
      CMD_DRAIN:          if (drain_last) state_d = CMD_UPDATE;
      CMD_UPDATE:         state_d = (pass_last_row && first_row == ROW_LAST) ? CMD_DONE : CMD_RUN;
      default:            state_d = CMD_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CMD_IDLE;
      first_row <= '0;
      drain_cnt <= '0;
      rb_shift  <= 1'b0;
    end else begin
      state    <= state_d;
      rb_shift <= mem_re;
      if (state == CMD_DRAIN) drain_cnt <= drain_last ? '0 : drain_cnt + 1'b1;
      else                    drain_cnt <= '0;
      if ((state == CMD_IDLE || state == CMD_DONE) && start) first_row <= '0;
      else if (state == CMD_UPDATE && pass_last_row && first_row != ROW_LAST)
        first_row <= first_row + 1'b1;
    end
  end

  wire start_run = (state == CMD_IDLE || state == CMD_DONE) && start;
  wire update    = (state == CMD_UPDATE);

  assign busy     = !(state == CMD_IDLE || state == CMD_DONE);
  assign done     = (state == CMD_DONE);
  assign agen_clr = start_run;
  assign col_adv  = (state == CMD_RUN);
  assign mem_re   = (state == CMD_RUN);
  assign row_adv  = update && !pass_last_row;
  assign row_load = update && pass_last_row && first_row != ROW_LAST;
  assign row_in   = first_row + 1'b1;
  assign rb_clr   = start_run || row_load;
  assign k_clr    = start_run || update;
  assign k_en     = rb_shift || (state == CMD_DRAIN);
  assign max_clr  = start_run;
  assign max_load = update;
  assign r1       = first_row;

  // A row is streamed only while the FSM is in RUN.
  a_run_only: assert property (@(posedge clk) disable iff (!rst_n) col_adv |-> state == CMD_RUN);
  // The last row of a pass never lies above its first row.
  a_pair: assert property (@(posedge clk) disable iff (!rst_n) busy |-> first_row <= row);

endmodule
