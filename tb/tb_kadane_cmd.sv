// tb_kadane_cmd: self-checking testbench of the Command Unit.
//
// The Command Unit runs against a real address generator (its row and
// last-column feedback). The testbench follows every pass and checks: the row
// pair (r1 and the current row) handed to MAX at each load strobe, in the order (0,0),
// (0,1) .. (0,M-1), (1,1) .. (M-1,M-1); N memory reads and N RowBuffer shifts
// per pass, the shifts one clock after the reads; N+2 Kadane1D enables per
// pass; a hold of 3 clocks with no reads before each MAX load; RowBuffer
// clears exactly at the start and when the first row changes; N+4 clocks per
// pass and done after 1 + M(M+1)/2*(N+4) clocks; a second start from DONE.
module tb_kadane_cmd;
  import kadane_pkg::*;
  localparam int unsigned M = 4, N = 5, ROW_W = 2, COL_W = 3, AW = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic last_col, last_row;
  logic [ROW_W-1:0] row, row_in, r1;
  logic [COL_W-1:0] col;
  logic [AW-1:0] addr;
  cmd_state_t state;
  logic busy, done, agen_clr, col_adv, row_adv, row_load, mem_re, rb_clr, rb_shift;
  logic k_clr, k_en, max_clr, max_load;
  int checks = 0, failures = 0;

  kadane_cmd #(.M(M)) dut (.*);
  kadane_addrgen #(.M(M), .N(N)) agen (.clk, .rst_n, .clr(agen_clr), .col_adv, .row_adv,
    .row_load, .row_in, .addr, .row, .col, .last_col, .last_row);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // per-pass counters, sampled at every rising edge
  int reads, shifts, kens, clrs, pass, cycles, since_read;
  bit prev_re;
  int exp_i, exp_j;

  always @(posedge clk) if (rst_n && busy) begin
    cycles++;
    expect_true(rb_shift == prev_re, "RowBuffer shift one clock after the read");
    prev_re = mem_re;
    if (mem_re) begin
      expect_true(int'(addr) == exp_j * int'(N) + reads, "read address");
      reads++; since_read = 0;
    end else since_read++;
    if (rb_shift) shifts++;
    if (k_en) kens++;
    if (rb_clr) clrs++;
    if (max_load) begin
      expect_true(int'(r1) == exp_i && int'(row) == exp_j, $sformatf("row pair %0d", pass));
      expect_true(reads == int'(N) && shifts == int'(N), "N reads and shifts per pass");
      expect_true(kens == int'(N) + 2, "N+2 Kadane1D enables per pass");
      expect_true(since_read == 4, "three hold clocks, then the MAX load, with no reads");
      expect_true(k_clr, "Kadane1D cleared with the MAX load");
      if (exp_j == int'(M) - 1) begin
        expect_true(rb_clr == (exp_i != int'(M) - 1), "RowBuffer cleared at a new first row");
        exp_i++; exp_j = exp_i;
      end else begin
        expect_true(!rb_clr, "RowBuffer kept within a pass");
        exp_j++;
      end
      reads = 0; shifts = 0; kens = 0; pass++;
    end
  end

  task automatic one_run(input string what);
    int t0;
    reads = 0; shifts = 0; kens = 0; clrs = 0; pass = 0; cycles = 0; exp_i = 0; exp_j = 0;
    prev_re = 1'b0;
    @(negedge clk); start = 1'b1; #1;
    expect_true(agen_clr && rb_clr && k_clr && max_clr, {what, ": clears on start"});
    t0 = 0;
    @(negedge clk); start = 1'b0;
    while (!done) begin @(negedge clk); t0++; end
    expect_true(pass == int'(M * (M + 1) / 2), {what, ": number of passes"});
    expect_true(t0 + 1 == 1 + int'(M * (M + 1) / 2 * (N + 4)),
                $sformatf("%s: run length %0d clocks", what, t0 + 1));
    expect_true(clrs == int'(M) - 1, {what, ": RowBuffer clears between passes"});
    repeat (3) @(negedge clk);
    expect_true(done && !busy && !mem_re, {what, ": stays done"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    expect_true(!busy && !done && !mem_re, "idle after reset");
    one_run("first run");
    one_run("second run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
