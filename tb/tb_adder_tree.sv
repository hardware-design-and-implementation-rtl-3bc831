// tb_adder_tree: checks the pipelined adder tree with 5 operands (padded to
// 8, three levels): every cycle a new random set goes in, and the 18-bit
// wrapped sum and its valid bit must appear exactly three cycles later.
`timescale 1ns/1ps
module tb_adder_tree;
  localparam int N = 5, W = 18, LAT = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [W-1:0] in_data [N];
  logic signed [W-1:0] out_sum;
  int checks = 0, failures = 0;

  adder_tree #(.N(N), .W(W)) dut (.*);

  logic signed [W-1:0] exp_sum [$];
  logic                exp_v [$];

  initial begin
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic signed [W-1:0] s;
      @(negedge clk);
      // compare what entered LAT cycles ago
      if (exp_v.size() == LAT) begin
        logic v; logic signed [W-1:0] e;
        v = exp_v.pop_front(); e = exp_sum.pop_front();
        checks++;
        if (out_valid !== v || (v && out_sum !== e)) begin
          failures++;
          $display("t=%0d valid %0b/%0b sum %0d/%0d", t, out_valid, v, out_sum, e);
        end
      end
      in_valid = ($urandom % 4) != 0;
      s = '0;
      for (int i = 0; i < N; i++) begin
        in_data[i] = W'($urandom);
        s += in_data[i];
      end
      exp_v.push_back(in_valid);
      exp_sum.push_back(s);
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
