// sqnxt_layer: one layer of the layer-pipelined SqueezeNext accelerator.
//
// A layer owns one filter bank of PF parallel filters, each with PC parallel
// input channels (PC x PF multipliers), and runs all convolution stages of
// its SqueezeNext block on that bank one after the other, as listed in CFG.
// Feature maps move between its memories:
//   M1  input written by the previous layer, later reused as scratch,
//   M2  copy of the input written at the same time, kept for the shortcut,
//   M3  scratch, ping-ponged with M1 between stages,
//   M4  result of the shortcut (projection) convolution, when there is one,
//   PMEM pooled vector (last layer only), written by the average-pool unit.
// The last stage of a block adds the shortcut operand (M2 or M4) to its
// accumulator, applies ReLU and writes the next layer's input memories through
// the out_* port. Layer 14 sends conv66's results through avg_pool into PMEM
// and then runs the fully connected layer from PMEM to the out_* port.
//
// Timing: the layer controller and the filter bank run on a clock gated by
// 'en' (the stall controller's freeze), memories on the free clock. A tap
// issued in cycle t reads its data and weights at t+1, the filter result is
// valid at t+1+filter_latency(PC), the shortcut operand is read in that cycle
// and the result is written two cycles later. 'done' pulses when the last
// stage has drained. Weights and biases are loaded through wl_*/bl_* while
// the layer is idle.
//
// The split into three feature memories and the writing of the next layer's
// input into two memories at once follow the original design. The original design
// interleaves the shortcut convolution with the main one; here it runs as a
// separate first stage into M4. Zero-valued padding and the lane masks for
// channel counts that are not a multiple of PC or PF are this design's.
module sqnxt_layer
  import sqnxt_pkg::*;
#(
  parameter layer_t CFG      = net_layer(3),
  parameter int     IN_LANES = 16,   // lanes of the previous layer's writes
  parameter int     PC       = int'(CFG.pc),
  parameter int     PF       = int'(CFG.pf),
  parameter int     WDEPTH   = layer_wdepth(CFG),
  parameter int     BDEPTH   = layer_bdepth(CFG),
  parameter int     WAW      = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  parameter int     BAW      = (BDEPTH > 1) ? $clog2(BDEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,      // clock enable from the stall controller
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  // input feature map, written by the previous layer
  input  logic                     in_we,
  input  logic [IN_LANES-1:0]      in_wmask,
  input  logic [15:0]              in_ch,
  input  logic [15:0]              in_pix,
  input  logic [15:0]              in_hw,
  input  logic signed [DATA_W-1:0] in_wdata [IN_LANES],
  // parameter loading
  input  logic                     wl_we,
  input  logic [7:0]               wl_lane_f,
  input  logic [7:0]               wl_lane_c,
  input  logic [WAW-1:0]           wl_addr,
  input  logic signed [DATA_W-1:0] wl_data,
  input  logic                     bl_we,
  input  logic [7:0]               bl_lane,
  input  logic [BAW-1:0]           bl_addr,
  input  logic signed [ACC_W-1:0]  bl_data,
  // output feature map, written into the next layer
  output logic                     out_we,
  output logic [PF-1:0]            out_wmask,
  output logic [15:0]              out_ch,
  output logic [15:0]              out_pix,
  output logic [15:0]              out_hw,
  output logic signed [DATA_W-1:0] out_wdata [PF]
);
  localparam int FL   = filter_latency(PC);
  localparam int DRAIN = FL + 6;
  localparam bit HAS_M2   = layer_uses(CFG, MS_M2);
  localparam bit HAS_M3   = layer_uses(CFG, MS_M3);
  localparam bit HAS_M4   = layer_uses(CFG, MS_M4);
  localparam bit HAS_POOL = layer_uses(CFG, MS_POOL);
  localparam int BK1  = imax(IN_LANES, imax(PC, PF));
  localparam int BKI  = imax(PC, PF);
  localparam int BKP  = imax(PC, PF);

  function automatic int pool_shift(layer_t l);
    for (int s = 0; s < int'(l.nst); s++)
      if (l.st[s].dst == MS_POOL) return $clog2(out_w(l.st[s]) * out_h(l.st[s]));
    return 1;
  endfunction

  // ---------------------------------------------------------------- clock
  logic gclk;
  clock_gate u_icg (.clk(clk), .en(en), .gclk(gclk));

  // ---------------------------------------------------------------- control
  logic           iss_valid, iss_first, iss_last, iss_pad, iss_relu;
  logic [2:0]     iss_stage;
  mem_sel_e       iss_src, iss_dst, iss_skip;
  logic [15:0]    iss_ch, iss_ci, iss_pix, iss_hw, iss_opix, iss_och, iss_oco, iss_ohw;
  logic [WAW-1:0] iss_waddr;
  logic [BAW-1:0] iss_baddr;

  layer_controller #(.CFG(CFG), .WAW(WAW), .BAW(BAW), .DRAIN(DRAIN)) u_ctrl (
    .clk(gclk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .iss_valid(iss_valid), .iss_first(iss_first), .iss_last(iss_last),
    .iss_stage(iss_stage), .iss_src(iss_src), .iss_ch(iss_ch), .iss_ci(iss_ci),
    .iss_pix(iss_pix), .iss_hw(iss_hw), .iss_pad(iss_pad), .iss_waddr(iss_waddr),
    .iss_baddr(iss_baddr), .iss_opix(iss_opix), .iss_och(iss_och),
    .iss_oco(iss_oco), .iss_ohw(iss_ohw), .iss_dst(iss_dst), .iss_skip(iss_skip),
    .iss_relu(iss_relu)
  );

  logic issue;
  assign issue = iss_valid & en;

  // ---------------------------------------------------------------- post-processing signals
  typedef struct packed {
    logic        v;
    logic [15:0] pix, ch, co, hw;
    mem_sel_e    dst, skip;
    logic        relu;
  } oinfo_t;

  oinfo_t info_sh [FL+1];
  oinfo_t a_info, b_info;
  logic signed [ACC_W-1:0]  a_acc [PF];
  logic signed [DATA_W-1:0] b_res [PF];
  logic                     f_valid [PF];
  logic signed [ACC_W-1:0]  f_acc [PF];

  // skip-operand read request (stage A)
  logic        sk_re;
  mem_sel_e    sk_sel;
  assign sk_re  = info_sh[FL].v && f_valid[0] && (info_sh[FL].skip != MS_NONE);
  assign sk_sel = info_sh[FL].skip;

  // ---------------------------------------------------------------- memories
  // engine write (stage B)
  logic                     e_we;
  logic [PF-1:0]            e_mask;
  always_comb begin
    e_we = b_info.v;
    for (int f = 0; f < PF; f++) e_mask[f] = (int'(b_info.ch) + f) < int'(b_info.co);
  end

  logic signed [DATA_W-1:0] rd1 [BK1];
  logic signed [DATA_W-1:0] rd2 [BK1];
  logic signed [DATA_W-1:0] rd3 [BKI];
  logic signed [DATA_W-1:0] rd4 [BKI];
  logic signed [DATA_W-1:0] rdp [BKP];

  // M1: written by the previous layer while this layer is frozen, by the
  // engine while it runs
  begin : g_m1
    logic                     we;
    logic [BK1-1:0]           wm;
    logic [15:0]              wch, wpix, whw;
    logic signed [DATA_W-1:0] wd [BK1];
    always_comb begin
      for (int l = 0; l < BK1; l++) begin wm[l] = 1'b0; wd[l] = '0; end
      if (en) begin
        we = e_we && (b_info.dst == MS_M1);
        wch = b_info.ch; wpix = b_info.pix; whw = b_info.hw;
        for (int l = 0; l < PF; l++) begin wm[l] = e_mask[l]; wd[l] = b_res[l]; end
      end else begin
        we = in_we;
        wch = in_ch; wpix = in_pix; whw = in_hw;
        for (int l = 0; l < IN_LANES; l++) begin wm[l] = in_wmask[l]; wd[l] = in_wdata[l]; end
      end
    end
    data_memory #(.LANES(BK1), .BANKS(BK1), .DEPTH(mem_depth(CFG, MS_M1, BK1))) u_mem (
      .clk(clk), .we(we), .wmask(wm), .wch(wch), .wpix(wpix), .whw(whw), .wdata(wd),
      .re(issue && iss_src == MS_M1), .rch(iss_ch), .rpix(iss_pix), .rhw(iss_hw),
      .rdata(rd1)
    );
  end

  if (HAS_M2) begin : g_m2
    logic [BK1-1:0]           wm;
    logic signed [DATA_W-1:0] wd [BK1];
    logic                     re;
    logic [15:0]              rch, rpix, rhw;
    always_comb begin
      for (int l = 0; l < BK1; l++) begin
        wm[l] = (l < IN_LANES) ? in_wmask[l % IN_LANES] : 1'b0;
        wd[l] = (l < IN_LANES) ? in_wdata[l % IN_LANES] : '0;
      end
      if (sk_re && sk_sel == MS_M2) begin
        re = 1'b1; rch = info_sh[FL].ch; rpix = info_sh[FL].pix; rhw = info_sh[FL].hw;
      end else begin
        re = issue && iss_src == MS_M2; rch = iss_ch; rpix = iss_pix; rhw = iss_hw;
      end
    end
    data_memory #(.LANES(BK1), .BANKS(BK1), .DEPTH(mem_depth(CFG, MS_M2, BK1))) u_mem (
      .clk(clk), .we(in_we && !en), .wmask(wm), .wch(in_ch), .wpix(in_pix), .whw(in_hw),
      .wdata(wd), .re(re), .rch(rch), .rpix(rpix), .rhw(rhw), .rdata(rd2)
    );
  end else begin : g_no_m2
    always_comb for (int l = 0; l < BK1; l++) rd2[l] = '0;
  end

  if (HAS_M3) begin : g_m3
    logic signed [DATA_W-1:0] wd [BKI];
    logic [BKI-1:0]           wm;
    always_comb begin
      for (int l = 0; l < BKI; l++) begin
        wm[l] = (l < PF) ? e_mask[l % PF] : 1'b0;
        wd[l] = (l < PF) ? b_res[l % PF] : '0;
      end
    end
    data_memory #(.LANES(BKI), .BANKS(BKI), .DEPTH(mem_depth(CFG, MS_M3, BKI))) u_mem (
      .clk(clk), .we(en && e_we && b_info.dst == MS_M3), .wmask(wm), .wch(b_info.ch),
      .wpix(b_info.pix), .whw(b_info.hw), .wdata(wd),
      .re(issue && iss_src == MS_M3), .rch(iss_ch), .rpix(iss_pix), .rhw(iss_hw),
      .rdata(rd3)
    );
  end else begin : g_no_m3
    always_comb for (int l = 0; l < BKI; l++) rd3[l] = '0;
  end

  if (HAS_M4) begin : g_m4
    logic signed [DATA_W-1:0] wd [BKI];
    logic [BKI-1:0]           wm;
    always_comb begin
      for (int l = 0; l < BKI; l++) begin
        wm[l] = (l < PF) ? e_mask[l % PF] : 1'b0;
        wd[l] = (l < PF) ? b_res[l % PF] : '0;
      end
    end
    data_memory #(.LANES(BKI), .BANKS(BKI), .DEPTH(mem_depth(CFG, MS_M4, BKI))) u_mem (
      .clk(clk), .we(en && e_we && b_info.dst == MS_M4), .wmask(wm), .wch(b_info.ch),
      .wpix(b_info.pix), .whw(b_info.hw), .wdata(wd),
      .re(sk_re && sk_sel == MS_M4), .rch(info_sh[FL].ch), .rpix(info_sh[FL].pix),
      .rhw(info_sh[FL].hw), .rdata(rd4)
    );
  end else begin : g_no_m4
    always_comb for (int l = 0; l < BKI; l++) rd4[l] = '0;
  end

  if (HAS_POOL) begin : g_pool
    logic                     p_valid;
    logic [15:0]              p_ch;
    logic signed [DATA_W-1:0] p_data [PF];
    logic signed [DATA_W-1:0] wd [BKP];
    logic [BKP-1:0]           wm;
    avg_pool #(.LANES(PF), .SHIFT(pool_shift(CFG))) u_pool (
      .clk(gclk), .rst_n(rst_n),
      .in_valid(b_info.v && b_info.dst == MS_POOL), .in_ch(b_info.ch), .in_data(b_res),
      .out_valid(p_valid), .out_ch(p_ch), .out_data(p_data)
    );
    always_comb begin
      for (int l = 0; l < BKP; l++) begin
        wm[l] = (l < PF);
        wd[l] = (l < PF) ? p_data[l % PF] : '0;
      end
    end
    data_memory #(.LANES(BKP), .BANKS(BKP), .DEPTH(mem_depth(CFG, MS_PMEM, BKP))) u_mem (
      .clk(clk), .we(en && p_valid), .wmask(wm), .wch(p_ch), .wpix(16'd0), .whw(16'd1),
      .wdata(wd), .re(issue && iss_src == MS_PMEM), .rch(iss_ch), .rpix(iss_pix),
      .rhw(iss_hw), .rdata(rdp)
    );
  end else begin : g_no_pool
    always_comb for (int l = 0; l < BKP; l++) rdp[l] = '0;
  end

  // ---------------------------------------------------------------- weights and biases
  logic signed [DATA_W-1:0] wq [PF][PC];
  logic signed [ACC_W-1:0]  bias [PF];

  for (genvar f = 0; f < PF; f++) begin : g_par
    weight_memory #(.N(PC), .DEPTH(WDEPTH), .AW(WAW), .LW((PC > 1) ? $clog2(PC) : 1)) u_w (
      .clk(clk), .we(wl_we && int'(wl_lane_f) == f),
      .waddr(wl_addr), .wlane(((PC > 1) ? $clog2(PC) : 1)'(wl_lane_c)), .wdata(wl_data),
      .re(issue), .raddr(iss_waddr), .rdata(wq[f])
    );
    bias_regfile #(.DEPTH(BDEPTH), .AW(BAW)) u_b (
      .clk(clk), .rst_n(rst_n), .we(bl_we && int'(bl_lane) == f),
      .waddr(bl_addr), .wdata(bl_data), .raddr(iss_baddr), .rdata(bias[f])
    );
  end

  // ---------------------------------------------------------------- P1: operands
  logic                    p1_v, p1_first, p1_last, p1_pad;
  mem_sel_e                p1_src;
  logic [15:0]             p1_ch, p1_ci;
  logic signed [ACC_W-1:0] p1_bias [PF];

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      p1_v <= 1'b0; p1_first <= 1'b0; p1_last <= 1'b0; p1_pad <= 1'b0;
      p1_src <= MS_NONE; p1_ch <= '0; p1_ci <= '0;
      for (int f = 0; f < PF; f++) p1_bias[f] <= '0;
    end else begin
      p1_v <= issue; p1_first <= iss_first; p1_last <= iss_last; p1_pad <= iss_pad;
      p1_src <= iss_src; p1_ch <= iss_ch; p1_ci <= iss_ci;
      for (int f = 0; f < PF; f++) p1_bias[f] <= bias[f];
    end
  end

  logic signed [DATA_W-1:0] x [PC];
  always_comb begin
    for (int l = 0; l < PC; l++) begin
      logic signed [DATA_W-1:0] d;
      case (p1_src)
        MS_M1:   d = rd1[l];
        MS_M2:   d = rd2[l];
        MS_M3:   d = rd3[l % BKI];
        MS_PMEM: d = rdp[l % BKP];
        default: d = '0;
      endcase
      x[l] = (p1_pad || (int'(p1_ch) + l) >= int'(p1_ci)) ? '0 : d;
    end
  end

  // ---------------------------------------------------------------- filter bank
  for (genvar f = 0; f < PF; f++) begin : g_filt
    conv_filter #(.N(PC)) u_f (
      .clk(gclk), .rst_n(rst_n), .in_valid(p1_v), .in_first(p1_first), .in_last(p1_last),
      .in_x(x), .in_w(wq[f]), .in_bias(p1_bias[f]),
      .out_valid(f_valid[f]), .out_acc(f_acc[f])
    );
  end

  // ---------------------------------------------------------------- output address delay line
  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= FL; i++) info_sh[i] <= '0;
    end else begin
      info_sh[0].v    <= issue & iss_last;
      info_sh[0].pix  <= iss_opix;
      info_sh[0].ch   <= iss_och;
      info_sh[0].co   <= iss_oco;
      info_sh[0].hw   <= iss_ohw;
      info_sh[0].dst  <= iss_dst;
      info_sh[0].skip <= iss_skip;
      info_sh[0].relu <= iss_relu;
      for (int i = 1; i <= FL; i++) info_sh[i] <= info_sh[i-1];
    end
  end

  // A: capture the accumulators, read the shortcut operand
  // B: add shortcut, ReLU, trim to 16 bits
  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      a_info <= '0; b_info <= '0;
      for (int f = 0; f < PF; f++) begin a_acc[f] <= '0; b_res[f] <= '0; end
    end else begin
      a_info   <= info_sh[FL];
      a_info.v <= info_sh[FL].v & f_valid[0];
      for (int f = 0; f < PF; f++) a_acc[f] <= f_acc[f];
      b_info <= a_info;
      for (int f = 0; f < PF; f++) begin
        logic signed [ACC_W-1:0] s;
        logic signed [DATA_W-1:0] sk;
        case (a_info.skip)
          MS_M2:   sk = rd2[f];
          MS_M4:   sk = rd4[f % BKI];
          default: sk = '0;
        endcase
        s = a_acc[f] + ACC_W'(sk);
        if (a_info.relu && s < 0) s = '0;
        b_res[f] <= sat16(s);
      end
    end
  end

  // ---------------------------------------------------------------- output port
  always_comb begin
    out_we    = en && b_info.v && (b_info.dst == MS_OUT);
    out_wmask = e_mask;
    out_ch    = b_info.ch;
    out_pix   = b_info.pix;
    out_hw    = b_info.hw;
    for (int f = 0; f < PF; f++) out_wdata[f] = b_res[f];
  end
endmodule
