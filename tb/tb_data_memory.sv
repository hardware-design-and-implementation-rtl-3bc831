// tb_data_memory: writes a 12-channel 5x5 map into an 8-bank memory with
// 4-lane writes (random lane masks, channel bases 0, 4, 8) and reads it back
// 4 lanes at a time from random channel bases, then checks a second map of
// different size stored over the first (the per-access HW argument).
`timescale 1ns/1ps
module tb_data_memory;
  localparam int L = 4, B = 8, DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [L-1:0] wmask = 0;
  logic [15:0] wch = 0, wpix = 0, whw = 0, rch = 0, rpix = 0, rhw = 0;
  logic signed [15:0] wdata [L], rdata [L];
  int checks = 0, failures = 0;

  data_memory #(.LANES(L), .BANKS(B), .DEPTH(DEPTH)) dut (.*);

  task automatic run(int C, int HW);
    int model [int];
    for (int p = 0; p < HW; p++)
      for (int cb = 0; cb < C; cb += L)
        for (int pass = 0; pass < 2; pass++) begin
          @(negedge clk);
          we = 1; wch = 16'(cb); wpix = 16'(p); whw = 16'(HW);
          wmask = (pass == 0) ? L'($urandom) : '1;
          for (int l = 0; l < L; l++) begin
            wdata[l] = 16'($urandom);
            if (wmask[l] && (pass == 1 || !model.exists((cb + l) * HW + p) || 1))
              model[(cb + l) * HW + p] = int'(wdata[l]);
          end
        end
    @(negedge clk); we = 0;
    for (int t = 0; t < 150; t++) begin
      int cb, p;
      cb = L * int'($urandom % (C / L));
      p = int'($urandom % HW);
      @(negedge clk);
      re = 1; rch = 16'(cb); rpix = 16'(p); rhw = 16'(HW);
      @(negedge clk);
      re = 0;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (int'(rdata[l]) != model[(cb + l) * HW + p]) begin
          failures++;
          $display("ch %0d pix %0d read %0d expected %0d", cb + l, p, rdata[l], model[(cb + l) * HW + p]);
        end
      end
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) wdata[l] = 0;
    run(12, 25);
    run(16, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
