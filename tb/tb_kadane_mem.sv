// tb_kadane_mem: self-checking testbench of the array memory.
//
// Writes a pseudo-random pattern, reads it back in address order and in a
// scattered order, and checks the one-clock read latency and that rdata
// holds while re = 0.
module tb_kadane_mem;
  localparam int unsigned W = 9, DEPTH = 1024, AW = 10;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  kadane_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pat(input int a);
    return W'((a * 37 + 11) ^ (a >> 3));
  endfunction

  initial begin
    logic [W-1:0] held;
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = pat(a);
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < int'(DEPTH); a++) begin
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("FAIL read %0d", a); end
    end
    for (int k = 0; k < 500; k++) begin
      automatic int a = int'($urandom_range(0, DEPTH - 1));
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("FAIL random read %0d", a); end
    end
    // hold
    held = rdata;
    re = 1'b0; raddr = raddr + 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (rdata !== held) begin failures++; $display("FAIL hold"); end
    // overwrite and read back
    we = 1'b1; waddr = 10'd5; wdata = 9'h1A5;
    @(negedge clk); we = 1'b0; re = 1'b1; raddr = 10'd5;
    @(negedge clk);
    checks++;
    if (rdata !== 9'h1A5) begin failures++; $display("FAIL overwrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
