// tb_sqnxt_layer: self-checking test of sqnxt_layer on two reduced layers.
//
// DUT A is a SqueezeNext block with a stride-2 projection shortcut, 1x3 and
// 3x1 stages with padding and channel counts that are not multiples of the
// 4x4 filter bank (6 input channels, a 2-channel stage). DUT B ends with the
// average pool and a 5-output fully connected stage. Weights, biases and
// the input map are generated, loaded through the load ports, the layer is
// run with its clock enable high, and every value it writes to its output
// port is compared with the bit-exact reference model. The number of cycles
// from start to done is checked against issues + drain per stage. A second
// run of DUT A with new input checks that the memories are reused correctly.
`timescale 1ns/1ps
module tb_sqnxt_layer;
  import sqnxt_pkg::*;
  import sqnxt_ref_pkg::*;

  localparam int P = 4;

  function automatic layer_t cfg_a();
    layer_t l = '0;
    l.nst = 6; l.pc = 4; l.pf = 4;
    l.st[0] = mk(6, 6, 6, 8, 1, 1, 2, 0, 0, MS_M2, MS_M4,  MS_NONE, 1);
    l.st[1] = mk(6, 6, 6, 4, 1, 1, 2, 0, 0, MS_M1, MS_M3,  MS_NONE, 1);
    l.st[2] = mk(3, 3, 4, 2, 1, 1, 1, 0, 0, MS_M3, MS_M1,  MS_NONE, 1);
    l.st[3] = mk(3, 3, 2, 4, 1, 3, 1, 0, 1, MS_M1, MS_M3,  MS_NONE, 1);
    l.st[4] = mk(3, 3, 4, 4, 3, 1, 1, 1, 0, MS_M3, MS_M1,  MS_NONE, 1);
    l.st[5] = mk(3, 3, 4, 8, 1, 1, 1, 0, 0, MS_M1, MS_OUT, MS_M4,   1);
    return l;
  endfunction

  function automatic layer_t cfg_b();
    layer_t l = '0;
    l.nst = 2; l.pc = 4; l.pf = 4;
    l.st[0] = mk(4, 4, 8, 8, 3, 3, 1, 1, 1, MS_M1,   MS_POOL, MS_NONE, 1);
    l.st[1] = mk(1, 1, 8, 5, 1, 1, 1, 0, 0, MS_PMEM, MS_OUT,  MS_NONE, 0);
    return l;
  endfunction

  localparam layer_t CA = cfg_a();
  localparam layer_t CB = cfg_b();

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // shared stimulus signals, one set per DUT
  logic                     en   [2];
  logic                     start[2];
  logic                     busy [2];
  logic                     done [2];
  logic                     in_we[2];
  logic [P-1:0]             in_wmask;
  logic [15:0]              in_ch, in_pix, in_hw;
  logic signed [15:0]       in_wdata [P];
  logic                     wl_we[2], bl_we[2];
  logic [7:0]               wl_lane_f, wl_lane_c, bl_lane;
  logic [15:0]              wl_addr;
  logic [7:0]               bl_addr;
  logic signed [15:0]       wl_data;
  logic signed [17:0]       bl_data;
  logic                     out_we [2];
  logic [P-1:0]             out_wmask [2];
  logic [15:0]              out_ch [2], out_pix [2], out_hw [2];
  logic signed [15:0]       out_a [P], out_b [P];

  sqnxt_layer #(.CFG(CA), .IN_LANES(P)) dut_a (
    .clk, .rst_n, .en(en[0]), .start(start[0]), .busy(busy[0]), .done(done[0]),
    .in_we(in_we[0]), .in_wmask, .in_ch, .in_pix, .in_hw, .in_wdata,
    .wl_we(wl_we[0]), .wl_lane_f, .wl_lane_c, .wl_addr(wl_addr[$clog2(layer_wdepth(CA))-1:0]),
    .wl_data, .bl_we(bl_we[0]), .bl_lane, .bl_addr(bl_addr[$clog2(layer_bdepth(CA))-1:0]), .bl_data,
    .out_we(out_we[0]), .out_wmask(out_wmask[0]), .out_ch(out_ch[0]), .out_pix(out_pix[0]),
    .out_hw(out_hw[0]), .out_wdata(out_a)
  );

  sqnxt_layer #(.CFG(CB), .IN_LANES(P)) dut_b (
    .clk, .rst_n, .en(en[1]), .start(start[1]), .busy(busy[1]), .done(done[1]),
    .in_we(in_we[1]), .in_wmask, .in_ch, .in_pix, .in_hw, .in_wdata,
    .wl_we(wl_we[1]), .wl_lane_f, .wl_lane_c, .wl_addr(wl_addr[$clog2(layer_wdepth(CB))-1:0]),
    .wl_data, .bl_we(bl_we[1]), .bl_lane, .bl_addr(bl_addr[$clog2(layer_bdepth(CB))-1:0]), .bl_data,
    .out_we(out_we[1]), .out_wmask(out_wmask[1]), .out_ch(out_ch[1]), .out_pix(out_pix[1]),
    .out_hw(out_hw[1]), .out_wdata(out_b)
  );

  // captured outputs
  int got [2][int];
  int nwr [2];
  always @(posedge clk) begin
    for (int d = 0; d < 2; d++)
      if (out_we[d])
        for (int l = 0; l < P; l++)
          if (out_wmask[d][l]) begin
            got[d][(int'(out_ch[d]) + l) * int'(out_hw[d]) + int'(out_pix[d])] =
              (d == 0) ? int'(out_a[l]) : int'(out_b[l]);
            nwr[d]++;
          end
  end

  task automatic load_params(int d, int li, layer_t l);
    for (int s = 0; s < int'(l.nst); s++) begin
      stage_t st = l.st[s];
      int fanin = int'(st.ci) * int'(st.kw) * int'(st.kh);
      for (int o = 0; o < int'(st.co); o++) begin
        for (int c = 0; c < int'(st.ci); c++)
          for (int j = 0; j < int'(st.kh); j++)
            for (int k = 0; k < int'(st.kw); k++) begin
              @(negedge clk);
              wl_we[d] = 1; wl_lane_f = 8'(o % P); wl_lane_c = 8'(c % P);
              wl_addr = 16'(w_addr(l, s, o, c, j, k));
              wl_data = 16'(wgen(li, s, o, c, j, k, fanin));
            end
        @(negedge clk);
        wl_we[d] = 0;
        bl_we[d] = 1; bl_lane = 8'(o % P); bl_addr = 8'(b_addr(l, s, o));
        bl_data = 18'(bgen(li, s, o));
      end
    end
    @(negedge clk);
    wl_we[d] = 0; bl_we[d] = 0;
  endtask

  task automatic load_input(int d, int img, int ci, int hw, output int map[]);
    map = new[ci * hw];
    for (int p = 0; p < hw; p++)
      for (int cb = 0; cb < ci; cb += P) begin
        @(negedge clk);
        in_we[d] = 1; in_ch = 16'(cb); in_pix = 16'(p); in_hw = 16'(hw);
        for (int l = 0; l < P; l++) begin
          int v = pgen(img, cb + l, p) - 2048;   // some negative inputs too
          in_wmask[l] = (cb + l < ci);
          in_wdata[l] = 16'(v);
          if (cb + l < ci) map[(cb + l) * hw + p] = v;
        end
      end
    @(negedge clk);
    in_we[d] = 0;
  endtask

  function automatic int expected_cycles(layer_t l);
    int n = 0;
    int drain = filter_latency(int'(l.pc)) + 6;
    for (int s = 0; s < int'(l.nst); s++)
      n += stage_wwords(l, s) / (int'(l.st[s].kw) * int'(l.st[s].kh) *
           cdiv(int'(l.st[s].ci), int'(l.pc)) * cdiv(int'(l.st[s].co), int'(l.pf)))
           * cdiv(int'(l.st[s].co), int'(l.pf)) * cdiv(int'(l.st[s].ci), int'(l.pc))
           * out_w(l.st[s]) * out_h(l.st[s]) * int'(l.st[s].kw) * int'(l.st[s].kh) + drain;
    return n;
  endfunction

  task automatic run_and_check(int d, int li, layer_t l, int in_map[]);
    int exp_map[];
    int cyc = 0;
    int nexp;
    got[d].delete(); nwr[d] = 0;
    run_layer(li, l, in_map, exp_map);
    @(negedge clk);
    en[d] = 1; start[d] = 1;
    @(negedge clk);
    start[d] = 0;
    while (!done[d]) begin @(negedge clk); cyc++; end
    @(negedge clk);
    en[d] = 0;
    checks++;
    if (cyc != expected_cycles(l)) begin
      failures++;
      $display("layer %0d: %0d cycles, expected %0d", d, cyc, expected_cycles(l));
    end
    nexp = exp_map.size();
    checks++;
    if (nwr[d] != nexp) begin
      failures++;
      $display("layer %0d: %0d writes, expected %0d", d, nwr[d], nexp);
    end
    for (int i = 0; i < nexp; i++) begin
      checks++;
      if (!got[d].exists(i) || got[d][i] != exp_map[i]) begin
        failures++;
        if (failures < 10)
          $display("layer %0d out[%0d] = %0d expected %0d", d, i,
                   got[d].exists(i) ? got[d][i] : -99999, exp_map[i]);
      end
    end
  endtask

  initial begin
    int map[];
    int nz;
    en = '{0, 0}; start = '{0, 0}; in_we = '{0, 0}; wl_we = '{0, 0}; bl_we = '{0, 0};
    in_wmask = '0; in_ch = '0; in_pix = '0; in_hw = '0;
    for (int l = 0; l < P; l++) in_wdata[l] = '0;
    wl_lane_f = '0; wl_lane_c = '0; wl_addr = '0; wl_data = '0;
    bl_lane = '0; bl_addr = '0; bl_data = '0;
    nwr = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_params(0, 1, CA);
    load_params(1, 2, CB);
    for (int img = 0; img < 2; img++) begin
      load_input(0, img, 6, 36, map);
      run_and_check(0, 1, CA, map);
    end
    // the test must not pass on all-zero results
    nz = 0;
    foreach (got[0][i]) if (got[0][i] != 0) nz++;
    checks++;
    if (nz < 10) begin failures++; $display("too few non-zero outputs"); end
    load_input(1, 7, 8, 16, map);
    run_and_check(1, 2, CB, map);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
