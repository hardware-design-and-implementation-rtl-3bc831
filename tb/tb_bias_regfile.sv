// tb_bias_regfile: checks that the bias registers reset to zero, that
// writes land in the addressed entry only, and that the combinational read
// returns the 18-bit signed value.
`timescale 1ns/1ps
module tb_bias_regfile;
  localparam int DEPTH = 12, AW = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic signed [17:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  int model [DEPTH];

  bias_regfile #(.DEPTH(DEPTH)) dut (.*);

  task automatic check_all();
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (int'(rdata) != model[a]) begin
        failures++; $display("b[%0d] = %0d expected %0d", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) model[a] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      we = 1; waddr = AW'($urandom % DEPTH); wdata = 18'($urandom);
      model[waddr] = int'(wdata);
      @(negedge clk);
      we = 0;
      check_all();
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
