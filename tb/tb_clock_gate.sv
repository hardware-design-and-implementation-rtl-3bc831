// tb_clock_gate: drives the enable with random changes at random times in
// both clock phases. The gated clock must rise exactly on the clock edges
// where the enable was high just before the edge, and must never be high
// while clk is low (no glitch or clipped pulse).
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int gedges = 0, exp_edges = 0;
  logic en_before_edge = 0;

  clock_gate dut (.*);

  always @(posedge gclk) gedges++;
  // the enable seen during the low phase decides the next edge
  always @(clk or en) if (!clk) en_before_edge = en;
  always @(posedge clk) if (en_before_edge) exp_edges++;

  always @(gclk or clk) begin
    checks++;
    if (gclk && !clk) begin failures++; $display("gclk high while clk low at %0t", $time); end
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      #($urandom % 7 + 1);
      en = 1'($urandom % 2);
    end
    #20;
    checks++;
    if (gedges != exp_edges || gedges == 0) begin
      failures++; $display("%0d gated edges, expected %0d", gedges, exp_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
