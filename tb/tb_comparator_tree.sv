// tb_comparator_tree: 200 random sets of 10 scores (some with forced ties
// and all-negative sets) enter back to back; the index of the largest score
// (lowest index on a tie) must come out four cycles later with the maximum.
`timescale 1ns/1ps
module tb_comparator_tree;
  localparam int N = 10, W = 18, LAT = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [W-1:0] in_data [N], out_max;
  logic [3:0] out_index;
  int checks = 0, failures = 0;
  int exp_i [$], exp_m [$];
  logic exp_v [$];

  comparator_tree #(.N(N), .W(W), .IW(4)) dut (.*);

  initial begin
    for (int i = 0; i < N; i++) in_data[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200 + LAT; t++) begin
      int best;
      @(negedge clk);
      if (exp_v.size() == LAT) begin
        logic v; int ei, em;
        v = exp_v.pop_front(); ei = exp_i.pop_front(); em = exp_m.pop_front();
        checks++;
        if (out_valid !== v || (v && (int'(out_index) != ei || int'(out_max) != em))) begin
          failures++;
          $display("t=%0d got %0b/%0d/%0d expected %0b/%0d/%0d", t, out_valid, out_index, out_max, v, ei, em);
        end
      end
      in_valid = (t < 200) && ($urandom % 5 != 0);
      for (int i = 0; i < N; i++) begin
        in_data[i] = W'(int'($urandom % 2001) - 1000);
        if (t % 7 == 0) in_data[i] = W'(-int'($urandom % 50) - 1);
      end
      if (t % 3 == 0) in_data[$urandom % N] = in_data[$urandom % N];   // ties
      best = 0;
      for (int i = 1; i < N; i++) if (in_data[i] > in_data[best]) best = i;
      exp_v.push_back(in_valid); exp_i.push_back(best); exp_m.push_back(int'(in_data[best]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
