// tb_avg_pool: feeds 5 channel groups of 16 values per lane (8 lanes), with
// random idle cycles, and checks each group's averages (sum >>> 4) and its
// channel tag, and that the result appears one cycle after the 16th value.
`timescale 1ns/1ps
module tb_avg_pool;
  localparam int L = 8, SH = 4, N = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [15:0] in_ch = 0, out_ch;
  logic signed [15:0] in_data [L], out_data [L];
  int checks = 0, failures = 0;

  avg_pool #(.LANES(L), .SHIFT(SH)) dut (.*);

  task automatic group(int g);
    int sum [L];
    for (int l = 0; l < L; l++) sum[l] = 0;
    for (int n = 0; n < N; n++) begin
      if ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("early output"); end
      in_valid = 1; in_ch = 16'(g * L);
      for (int l = 0; l < L; l++) begin
        in_data[l] = 16'(int'($urandom % 65536) - 32768);
        sum[l] += int'(in_data[l]);
      end
    end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(out_ch) != g * L) begin
      failures++; $display("group %0d: valid %0b ch %0d", g, out_valid, out_ch);
    end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (int'(out_data[l]) != (sum[l] >>> SH)) begin
        failures++; $display("lane %0d: %0d expected %0d", l, out_data[l], sum[l] >>> SH);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) in_data[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 5; g++) group(g);
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
