// tb_simultaneous_memory: random simultaneous writes and reads on the
// one-write one-read RAM. A read returns, one cycle later, the last value
// written to that address before the read cycle (old data when the same
// address is written in the same cycle), and holds while RE is low.
`timescale 1ns/1ps
module tb_simultaneous_memory;
  localparam int W = 16, DEPTH = 64, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];

  simultaneous_memory #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    logic [W-1:0] exp;
    logic pend = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== exp) begin failures++; $display("read %h expected %h", rdata, exp); end
      end
      re = ($urandom % 4) != 0; raddr = AW'($urandom);
      we = ($urandom % 2) != 0; waddr = ($urandom % 3 == 0) ? raddr : AW'($urandom);
      wdata = W'($urandom);
      if (re) exp = model[raddr];
      if (re) pend = 1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
