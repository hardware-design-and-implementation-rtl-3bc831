// tb_stall_controller: four model layers with fixed run times (30, 80, 20
// and 50 cycles) driven by the stall controller, fed with 6 images. Checks
// that a layer only starts when its input is full and the next input memory
// is free, that it is never started twice, that the enable covers the start
// cycle and the whole run, that every layer processes every image once, that
// stalls occur (layer 1 is slow), and the steady-state interval.
`timescale 1ns/1ps
module tb_stall_controller;
  localparam int NL = 4, NIMG = 6;
  localparam int DUR [NL] = '{30, 80, 20, 50};
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic img_loaded = 0;
  logic [NL-1:0] layer_done, start, en, full, busy, stalled;
  int checks = 0, failures = 0;

  stall_controller #(.NL(NL)) dut (.*);

  // model layers: done pulse DUR cycles after start (counted on enabled cycles)
  int cnt [NL];
  bit run [NL];
  int nimg_done [NL];
  int n_stall = 0;
  longint cyc = 0, last_out = 0, interval = 0;
  always @(posedge clk) begin
    cyc++;
    if (stalled != 0) n_stall++;
    for (int i = 0; i < NL; i++) begin
      layer_done[i] <= 1'b0;
      if (start[i]) begin
        checks++;
        if (!full[i] || (i < NL - 1 && full[i+1]) || run[i] || !en[i]) begin
          failures++; $display("bad start of layer %0d at %0d", i, cyc);
        end
        run[i] = 1; cnt[i] = 0;
      end else if (run[i]) begin
        checks++;
        if (!en[i]) begin failures++; $display("layer %0d frozen while running", i); end
        cnt[i]++;
        if (cnt[i] == DUR[i]) begin
          layer_done[i] <= 1'b1; run[i] = 0; nimg_done[i]++;
          if (i == NL - 1) begin interval = cyc - last_out; last_out = cyc; end
        end
      end
    end
  end

  initial begin
    layer_done = '0;
    for (int i = 0; i < NL; i++) begin cnt[i] = 0; run[i] = 0; nimg_done[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NIMG; n++) begin
      while (full[0]) @(negedge clk);
      repeat (5) @(negedge clk);        // loading the image
      img_loaded = 1;
      @(negedge clk);
      img_loaded = 0;
      @(negedge clk);
    end
    while (nimg_done[NL-1] < NIMG) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (nimg_done[i] != NIMG) begin failures++; $display("layer %0d ran %0d times", i, nimg_done[i]); end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall"); end
    // slowest layer (80 cycles) plus the hand-over cycles bounds the interval
    checks++;
    if (interval < 80 || interval > 80 + 60) begin failures++; $display("interval %0d", interval); end
    $display("interval %0d cycles, %0d stall cycles", interval, n_stall);
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
