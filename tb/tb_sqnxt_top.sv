// tb_sqnxt_top: end-to-end test of the full SqueezeNext-14 accelerator.
//
// Loads generated weights and biases for all 14 layers through the load
// ports, then streams NIMG 32x32x3 images back to back. For every image the
// 10 class scores and the predicted class are compared with the bit-exact
// reference model of the whole network, and results must come out in image
// order. It also counts how often the pipeline mechanisms occurred and fails
// if one never did: layers frozen by a full output memory (stall), several
// layers busy at once on different images (pipelined inference), a new image
// accepted while the pipeline is still busy, and layers gated off. Reports
// the cycles to the first result and between results.
`timescale 1ns/1ps
module tb_sqnxt_top;
  import sqnxt_pkg::*;
  import sqnxt_ref_pkg::*;

  localparam int NIMG = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;

  logic               img_valid = 0, img_ready, img_last = 0;
  logic [15:0]        img_pix = 0;
  logic signed [15:0] img_data [3];
  logic               wl_we = 0, bl_we = 0;
  logic [3:0]         wl_layer = 0, bl_layer = 0;
  logic [7:0]         wl_lane_f = 0, wl_lane_c = 0, bl_lane = 0, bl_addr = 0;
  logic [15:0]        wl_addr = 0;
  logic signed [15:0] wl_data = 0;
  logic signed [17:0] bl_data = 0;
  logic               class_valid;
  logic [3:0]         class_idx;
  logic [15:0]        class_img_id;
  logic signed [15:0] scores [10];
  logic [13:0]        layer_busy, layer_stalled;

  sqnxt_top dut (.*);

  int checks = 0, failures = 0;
  int exp_scores [NIMG][10];
  int exp_class [NIMG];
  int nres = 0;
  longint cyc = 0, t_first_img = -1, t_res [NIMG];
  int n_stall = 0, n_overlap = 0, n_busy_load = 0, n_gated = 0;

  always @(posedge clk) begin
    cyc++;
    if (layer_stalled != 0) n_stall++;
    if ($countones(layer_busy) >= 2) n_overlap++;
    if (img_valid && img_ready && layer_busy[13:1] != 0) n_busy_load++;
    if (nres > 0 || t_first_img >= 0)
      if (layer_busy != '1) n_gated++;
  end

  // results
  always @(posedge clk) begin
    if (class_valid) begin
      if (nres < NIMG) begin
        t_res[nres] = cyc;
        checks++;
        if (int'(class_img_id) != nres) begin
          failures++; $display("result %0d tagged %0d", nres, class_img_id);
        end
        for (int c = 0; c < 10; c++) begin
          checks++;
          if (int'(scores[c]) != exp_scores[nres][c]) begin
            failures++;
            $display("image %0d score %0d = %0d expected %0d", nres, c, scores[c], exp_scores[nres][c]);
          end
        end
        checks++;
        if (int'(class_idx) != exp_class[nres]) begin
          failures++; $display("image %0d class %0d expected %0d", nres, class_idx, exp_class[nres]);
        end
        $display("image %0d: class %0d (cycle %0d)", nres, class_idx, cyc);
      end
      nres++;
    end
  end

  task automatic load_params();
    for (int li = 0; li < NUM_LAYERS; li++) begin
      layer_t l = net_layer(li);
      for (int s = 0; s < int'(l.nst); s++) begin
        stage_t st = l.st[s];
        int fanin = int'(st.ci) * int'(st.kw) * int'(st.kh);
        for (int o = 0; o < int'(st.co); o++) begin
          for (int c = 0; c < int'(st.ci); c++)
            for (int j = 0; j < int'(st.kh); j++)
              for (int k = 0; k < int'(st.kw); k++) begin
                @(negedge clk);
                wl_we = 1; wl_layer = 4'(li);
                wl_lane_f = 8'(o % int'(l.pf)); wl_lane_c = 8'(c % int'(l.pc));
                wl_addr = 16'(w_addr(l, s, o, c, j, k));
                wl_data = 16'(wgen(li, s, o, c, j, k, fanin));
              end
          @(negedge clk);
          wl_we = 0;
          bl_we = 1; bl_layer = 4'(li); bl_lane = 8'(o % int'(l.pf));
          bl_addr = 8'(b_addr(l, s, o)); bl_data = 18'(bgen(li, s, o));
        end
      end
    end
    @(negedge clk);
    wl_we = 0; bl_we = 0;
  endtask

  task automatic compute_expected();
    for (int img = 0; img < NIMG; img++) begin
      int m[], o[];
      int best;
      m = new[3 * 1024];
      for (int c = 0; c < 3; c++)
        for (int p = 0; p < 1024; p++) m[c*1024 + p] = pgen(img, c, p);
      for (int li = 0; li < NUM_LAYERS; li++) begin
        run_layer(li, net_layer(li), m, o);
        m = o;
      end
      best = 0;
      for (int c = 0; c < 10; c++) begin
        exp_scores[img][c] = m[c];
        if (m[c] > m[best]) best = c;
      end
      exp_class[img] = best;
    end
  endtask

  initial begin
    int nz;
    for (int c = 0; c < 3; c++) img_data[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    compute_expected();
    load_params();
    $display("parameters loaded at cycle %0d", cyc);
    for (int img = 0; img < NIMG; img++) begin
      for (int p = 0; p < 1024; p++) begin
        @(negedge clk);
        img_valid = 1; img_pix = 16'(p); img_last = (p == 1023);
        for (int c = 0; c < 3; c++) img_data[c] = 16'(pgen(img, c, p));
        @(posedge clk);
        while (!img_ready) @(posedge clk);
        if (img == 0 && p == 0) t_first_img = cyc;
      end
      @(negedge clk);
      img_valid = 0; img_last = 0;
    end
    while (nres < NIMG) @(posedge clk);
    repeat (5) @(posedge clk);
    // the scores must not be trivially equal
    nz = 0;
    for (int c = 1; c < 10; c++) if (exp_scores[0][c] != exp_scores[0][0]) nz++;
    checks++;
    if (nz == 0) begin failures++; $display("degenerate reference scores"); end
    checks++; if (nres != NIMG) begin failures++; $display("%0d results", nres); end
    $display("latency first image %0d cycles, interval %0d cycles",
             t_res[0] - t_first_img, t_res[NIMG-1] - t_res[NIMG-2]);
    $display("mechanisms: stall=%0d overlap=%0d load_while_busy=%0d gated=%0d",
             n_stall, n_overlap, n_busy_load, n_gated);
    checks++; if (n_stall == 0)     begin failures++; $display("no stall seen"); end
    checks++; if (n_overlap == 0)   begin failures++; $display("no pipelined overlap seen"); end
    checks++; if (n_busy_load == 0) begin failures++; $display("no image loaded while busy"); end
    checks++; if (n_gated == 0)     begin failures++; $display("no layer frozen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog timeout (%0d results)", nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
