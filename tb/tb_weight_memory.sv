// tb_weight_memory: loads every weight of a 4-lane, 20-word memory one lane
// at a time in random order, then reads random words and checks all four
// lanes one cycle after the read.
`timescale 1ns/1ps
module tb_weight_memory;
  localparam int N = 4, DEPTH = 20, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [1:0] wlane = 0;
  logic signed [15:0] wdata = 0, rdata [N];
  int checks = 0, failures = 0;
  int model [DEPTH][N];

  weight_memory #(.N(N), .DEPTH(DEPTH)) dut (.*);

  initial begin
    int order [$];
    for (int i = 0; i < DEPTH * N; i++) order.push_back(i);
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      we = 1; waddr = AW'(order[i] / N); wlane = 2'(order[i] % N);
      wdata = 16'($urandom); model[order[i] / N][order[i] % N] = int'(wdata);
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 100; t++) begin
      int a;
      a = int'($urandom % DEPTH);
      @(negedge clk); re = 1; raddr = AW'(a);
      @(negedge clk); re = 0;
      for (int l = 0; l < N; l++) begin
        checks++;
        if (int'(rdata[l]) != model[a][l]) begin
          failures++; $display("w[%0d][%0d] = %0d expected %0d", a, l, rdata[l], model[a][l]);
        end
      end
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
