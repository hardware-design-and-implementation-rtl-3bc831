// tb_conv_filter: checks one 4-channel filter. Random outputs of 1 to 6 taps
// each are fed back to back (one tap per cycle); for each output the
// accumulator must equal bias + sum of the 18-bit truncated products,
// computed by the reference model, and out_valid must rise exactly
// filter_latency(4) = 5 cycles after the output's last tap.
`timescale 1ns/1ps
module tb_conv_filter;
  import sqnxt_pkg::*;
  import sqnxt_ref_pkg::*;
  localparam int N = 4;
  localparam int LAT = filter_latency(N);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, in_last = 0, out_valid;
  logic signed [15:0] in_x [N], in_w [N];
  logic signed [17:0] in_bias = 0, out_acc;
  int checks = 0, failures = 0;

  conv_filter #(.N(N)) dut (.*);

  int  exp_q [$];
  longint exp_t [$];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        int e;
        longint t;
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        if (int'(out_acc) != e || cyc - t != LAT) begin
          failures++;
          $display("acc %0d expected %0d, latency %0d", out_acc, e, cyc - t);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin in_x[i] = 0; in_w[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 60; o++) begin
      int taps;
      longint acc;
      int b;
      taps = 1 + $urandom % 6;
      b = int'($urandom % 4001) - 2000;
      acc = b;
      for (int t = 0; t < taps; t++) begin
        @(negedge clk);
        in_valid = 1; in_first = (t == 0); in_last = (t == taps - 1);
        in_bias = 18'(b);
        for (int i = 0; i < N; i++) begin
          in_x[i] = 16'($urandom); in_w[i] = 16'(int'($urandom % 16384) - 8192);
          acc += prod18(in_x[i], in_w[i]);
        end
        if (t == taps - 1) begin exp_q.push_back(wrap18(acc)); exp_t.push_back(cyc); end
      end
      if ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; in_first = 0; in_last = 0; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
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
