// tb_layer_controller: runs the controller on a reduced three-stage layer
// (3x3 kernel with stride 2 and padding 1, a 1x3 stage, a stage whose
// channel count is not a multiple of the lanes) and compares every issued
// tap with the nested loops computed independently here: input pixel, pad
// flag, channel base, weight and bias address, first/last marks and output
// position. Also checks the drain wait between stages and the done pulse.
`timescale 1ns/1ps
module tb_layer_controller;
  import sqnxt_pkg::*;
  function automatic layer_t cfg();
    layer_t l = '0;
    l.nst = 3; l.pc = 2; l.pf = 2;
    l.st[0] = mk(5, 5, 3, 4, 3, 3, 2, 1, 1, MS_M1, MS_M3, MS_NONE, 1);
    l.st[1] = mk(3, 3, 4, 3, 1, 3, 1, 0, 1, MS_M3, MS_M1, MS_NONE, 1);
    l.st[2] = mk(3, 3, 3, 2, 1, 1, 1, 0, 0, MS_M1, MS_OUT, MS_M2, 0);
    return l;
  endfunction
  localparam layer_t C = cfg();
  localparam int DRAIN = 7;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic iss_valid, iss_first, iss_last, iss_pad, iss_relu;
  logic [2:0] iss_stage;
  mem_sel_e iss_src, iss_dst, iss_skip;
  logic [15:0] iss_ch, iss_ci, iss_pix, iss_hw, iss_opix, iss_och, iss_oco, iss_ohw;
  logic [7:0] iss_waddr, iss_baddr;
  int checks = 0, failures = 0;

  layer_controller #(.CFG(C), .WAW(8), .BAW(8), .DRAIN(DRAIN)) dut (.*);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s = %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic walk();
    int wb = 0, bb = 0;
    for (int s = 0; s < 3; s++) begin
      stage_t st = C.st[s];
      int wo = out_w(st), ho = out_h(st);
      int cgn = cdiv(int'(st.ci), 2), fgn = cdiv(int'(st.co), 2);
      for (int fg = 0; fg < fgn; fg++)
        for (int x = 0; x < ho; x++)
          for (int y = 0; y < wo; y++)
            for (int cg = 0; cg < cgn; cg++)
              for (int j = 0; j < int'(st.kh); j++)
                for (int k = 0; k < int'(st.kw); k++) begin
                  int r = x * int'(st.s) + j - int'(st.ph);
                  int q = y * int'(st.s) + k - int'(st.pw);
                  bit pad = (r < 0 || r >= int'(st.hi) || q < 0 || q >= int'(st.wi));
                  expect_eq("valid", int'(iss_valid), 1);
                  expect_eq("stage", int'(iss_stage), s);
                  expect_eq("pad", int'(iss_pad), int'(pad));
                  if (!pad) expect_eq("pix", int'(iss_pix), r * int'(st.wi) + q);
                  expect_eq("ch", int'(iss_ch), cg * 2);
                  expect_eq("waddr", int'(iss_waddr),
                            wb + ((fg * cgn + cg) * int'(st.kh) + j) * int'(st.kw) + k);
                  expect_eq("baddr", int'(iss_baddr), bb + fg);
                  expect_eq("first", int'(iss_first), int'(cg == 0 && j == 0 && k == 0));
                  expect_eq("last", int'(iss_last),
                            int'(cg == cgn - 1 && j == int'(st.kh) - 1 && k == int'(st.kw) - 1));
                  expect_eq("opix", int'(iss_opix), x * wo + y);
                  expect_eq("och", int'(iss_och), fg * 2);
                  expect_eq("dst", int'(iss_dst), int'(st.dst));
                  @(negedge clk);
                end
      wb += fgn * cgn * int'(st.kh) * int'(st.kw);
      bb += fgn;
      for (int d = 0; d < DRAIN; d++) begin
        expect_eq("drain valid", int'(iss_valid), 0);
        expect_eq("busy", int'(busy), 1);
        if (d < DRAIN - 1 || s < 2) expect_eq("early done", int'(done), 0);
        @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    walk();
    expect_eq("done", int'(done), 1);
    expect_eq("idle", int'(busy), 0);
    @(negedge clk);
    expect_eq("done pulse", int'(done), 0);
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
