// tb_image_controller: streams three 16-pixel images. Checks that every
// accepted beat becomes a memory write of the right pixel and channels, that
// img_loaded pulses once per image after its last pixel, that ready drops
// while the first layer's input is full, and that results are numbered in
// order.
`timescale 1ns/1ps
module tb_image_controller;
  localparam int HW = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic img_valid = 0, img_ready, img_last = 0, in_full = 0, mem_we, img_loaded, res_valid = 0;
  logic [15:0] img_pix = 0, mem_ch, mem_pix, mem_hw, res_id, images_in, images_out;
  logic signed [15:0] img_data [3], mem_wdata [3];
  logic [2:0] mem_wmask;
  int checks = 0, failures = 0;
  int nloaded = 0, nwrites = 0;

  image_controller #(.HW(HW), .CH(3)) dut (.*);

  // the "first layer": input becomes full on img_loaded, is released later
  int hold = 0;
  always @(posedge clk) begin
    if (img_loaded) begin nloaded++; in_full <= 1; hold = 25; end
    else if (hold > 0) begin hold--; if (hold == 0) in_full <= 0; end
    if (mem_we) begin
      nwrites++;
      checks++;
      if (in_full || mem_wmask != 3'b111 || mem_ch != 0 || mem_hw != HW ||
          mem_pix != img_pix || mem_wdata[0] != img_data[0] || mem_wdata[2] != img_data[2]) begin
        failures++; $display("bad write pix %0d", mem_pix);
      end
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) img_data[c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int img = 0; img < 3; img++) begin
      for (int p = 0; p < HW; p++) begin
        @(negedge clk);
        img_valid = 1; img_pix = 16'(p); img_last = (p == HW - 1);
        for (int c = 0; c < 3; c++) img_data[c] = 16'($urandom);
        @(posedge clk);
        while (!img_ready) @(posedge clk);
      end
      @(negedge clk);
      img_valid = 0;
      checks++;
      if (img_ready) begin failures++; $display("ready while input full"); end
    end
    repeat (40) @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (int'(res_id) != r) begin failures++; $display("result id %0d expected %0d", res_id, r); end
      res_valid = 1; @(negedge clk); res_valid = 0; @(negedge clk);
    end
    checks += 3;
    if (nloaded != 3) begin failures++; $display("%0d images loaded", nloaded); end
    if (nwrites != 3 * HW) begin failures++; $display("%0d writes", nwrites); end
    if (images_in != 3 || images_out != 3) begin failures++; $display("counters %0d %0d", images_in, images_out); end
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
