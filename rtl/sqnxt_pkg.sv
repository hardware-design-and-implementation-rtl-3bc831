// sqnxt_pkg: shared types, fixed-point formats and the network table of the
// layer-pipelined SqueezeNext-14 accelerator.
//
// Numbers: feature maps and weights are 16-bit two's complement with 13
// fraction bits (3 integer bits including the sign). Inside the filters the
// products are cut to 18 bits with the same 13 fraction bits, and the adder
// trees, accumulators and biases are all 18 bits wide; results are trimmed back
// to 16 bits (saturating) before they are stored. Batch normalisation is folded
// into the weights and biases offline, so there is no separate BN hardware.
//
// The network table lists, for each of the 14 hardware layers, the channel and
// filter parallelism of its filter bank and the sequence of convolution
// "stages" that bank executes (all stages of one layer share one bank). Each
// stage names the memory it reads, the memory it writes and, for the last
// convolution of a SqueezeNext block, the memory holding the shortcut operand.
// Layer 14 ends with the average pool and the fully connected layer.
//
// As in the original design's optimised version, the stride 2 that the
// textbook network applies at the start of block 2 is moved into block 1's
// shortcut (conv2) and last convolution (conv7): subsampling commutes with
// 1x1 convolutions, the addition and ReLU, so the result is the same while
// block 1 computes only the pixels block 2 uses. The 14-layer split (block 1
// in one layer rather than five) is this design's.
package sqnxt_pkg;

  localparam int DATA_W = 16;   // stored feature maps and weights
  localparam int FRAC_W = 13;   // fraction bits of every stored number
  localparam int ACC_W  = 18;   // adder tree, accumulator and bias width
  localparam int NUM_CLASSES = 10;
  localparam int CLASS_W = 4;

  localparam int NUM_LAYERS = 14;
  localparam int MAX_STAGES = 6;

  // memory selectors used by the stage table
  typedef enum logic [2:0] {
    MS_NONE = 3'd0,
    MS_M1   = 3'd1,  // layer input / scratch
    MS_M2   = 3'd2,  // copy of the layer input kept for the shortcut
    MS_M3   = 3'd3,  // scratch
    MS_M4   = 3'd4,  // result of the shortcut (projection) convolution
    MS_OUT  = 3'd5,  // next layer's input memories (or the class logits)
    MS_POOL = 3'd6,  // average-pool unit (write) / pooled vector (read)
    MS_PMEM = 3'd7   // pooled vector register file (read)
  } mem_sel_e;

  typedef struct packed {
    logic [15:0] wi, hi, ci, co;
    logic [3:0]  kw, kh, s, pw, ph;
    mem_sel_e    src, dst, skip;
    logic        relu;
  } stage_t;

  typedef stage_t [MAX_STAGES-1:0] stage_list_t;

  typedef struct packed {
    logic [7:0]  nst;   // number of stages
    logic [7:0]  pc;    // parallel channels per filter
    logic [7:0]  pf;    // parallel filters
    stage_list_t st;
  } layer_t;

  function automatic stage_t mk(int wi, int hi, int ci, int co, int kw, int kh,
                                int s, int pw, int ph, mem_sel_e src,
                                mem_sel_e dst, mem_sel_e skip, bit relu);
    stage_t r;
    r.wi = 16'(wi); r.hi = 16'(hi); r.ci = 16'(ci); r.co = 16'(co);
    r.kw = 4'(kw);  r.kh = 4'(kh);  r.s = 4'(s);    r.pw = 4'(pw); r.ph = 4'(ph);
    r.src = src; r.dst = dst; r.skip = skip; r.relu = relu;
    return r;
  endfunction

  function automatic int out_w(stage_t s);
    return (int'(s.wi) + 2 * int'(s.pw) - int'(s.kw)) / int'(s.s) + 1;
  endfunction

  function automatic int out_h(stage_t s);
    return (int'(s.hi) + 2 * int'(s.ph) - int'(s.kh)) / int'(s.s) + 1;
  endfunction

  function automatic int cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  // Layer table. Sizes follow the 1.0-SqNxt-14 breakdown for 32x32x3 CIFAR-10
  // images; parallelism follows the DSP budget per layer.
  function automatic layer_t net_layer(int i);
    layer_t l;
    l = '0;
    case (i)
      0: begin  // conv1
        l.nst = 1; l.pc = 3; l.pf = 64;
        l.st[0] = mk(32, 32,   3,  64, 3, 3, 1, 0, 0, MS_M1, MS_OUT, MS_NONE, 1);
      end
      1: begin  // block 1: conv2 (shortcut) and conv3..conv7; conv2, conv7 stride 2
        l.nst = 6; l.pc = 16; l.pf = 16;
        l.st[0] = mk(30, 30, 64, 32, 1, 1, 2, 0, 0, MS_M2, MS_M4,  MS_NONE, 1);
        l.st[1] = mk(30, 30, 64, 16, 1, 1, 1, 0, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[2] = mk(30, 30, 16,  8, 1, 1, 1, 0, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[3] = mk(30, 30,  8, 16, 1, 3, 1, 0, 1, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[4] = mk(30, 30, 16, 16, 3, 1, 1, 1, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[5] = mk(30, 30, 16, 32, 1, 1, 2, 0, 0, MS_M1, MS_OUT, MS_M4,   1);
      end
      2: begin  // block 2: conv8 (shortcut) and conv9..conv13, on the 15x15 map
        l.nst = 6; l.pc = 16; l.pf = 16;
        l.st[0] = mk(15, 15, 32, 64, 1, 1, 1, 0, 0, MS_M2, MS_M4,  MS_NONE, 1);
        l.st[1] = mk(15, 15, 32, 32, 1, 1, 1, 0, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[2] = mk(15, 15, 32, 16, 1, 1, 1, 0, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[3] = mk(15, 15, 16, 32, 1, 3, 1, 0, 1, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[4] = mk(15, 15, 32, 32, 3, 1, 1, 1, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[5] = mk(15, 15, 32, 64, 1, 1, 1, 0, 0, MS_M1, MS_OUT, MS_M4,   1);
      end
      3: begin  // block 3: conv14..conv18, identity shortcut
        l.nst = 5; l.pc = 16; l.pf = 16;
        l.st[0] = mk(15, 15, 64, 32, 1, 1, 1, 0, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[1] = mk(15, 15, 32, 16, 1, 1, 1, 0, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[2] = mk(15, 15, 16, 32, 3, 1, 1, 1, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[3] = mk(15, 15, 32, 32, 1, 3, 1, 0, 1, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[4] = mk(15, 15, 32, 64, 1, 1, 1, 0, 0, MS_M1, MS_OUT, MS_M2,   1);
      end
      4: begin  // block 4: conv19 (shortcut, stride 2) and conv20..conv24
        l.nst = 6; l.pc = 16; l.pf = 16;
        l.st[0] = mk(15, 15, 64, 128, 1, 1, 2, 0, 0, MS_M2, MS_M4,  MS_NONE, 1);
        l.st[1] = mk(15, 15, 64,  64, 1, 1, 2, 0, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[2] = mk( 8,  8, 64,  32, 1, 1, 1, 0, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[3] = mk( 8,  8, 32,  64, 1, 3, 1, 0, 1, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[4] = mk( 8,  8, 64,  64, 3, 1, 1, 1, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[5] = mk( 8,  8, 64, 128, 1, 1, 1, 0, 0, MS_M1, MS_OUT, MS_M4,   1);
      end
      5, 6, 7, 8, 9, 10, 11: begin  // seven identical blocks: conv25..conv29
        l.nst = 5; l.pc = 16; l.pf = 16;
        l.st[0] = mk(8, 8, 128, 64, 1, 1, 1, 0, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[1] = mk(8, 8,  64, 32, 1, 1, 1, 0, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[2] = mk(8, 8,  32, 64, 3, 1, 1, 1, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[3] = mk(8, 8,  64, 64, 1, 3, 1, 0, 1, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[4] = mk(8, 8,  64, 128, 1, 1, 1, 0, 0, MS_M1, MS_OUT, MS_M2,  1);
      end
      12: begin  // block 12: conv60 (shortcut, stride 2) and conv61..conv65
        l.nst = 6; l.pc = 16; l.pf = 16;
        l.st[0] = mk(8, 8, 128, 256, 1, 1, 2, 0, 0, MS_M2, MS_M4,  MS_NONE, 1);
        l.st[1] = mk(8, 8, 128, 128, 1, 1, 2, 0, 0, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[2] = mk(4, 4, 128,  64, 1, 1, 1, 0, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[3] = mk(4, 4,  64, 128, 1, 3, 1, 0, 1, MS_M1, MS_M3,  MS_NONE, 1);
        l.st[4] = mk(4, 4, 128, 128, 3, 1, 1, 1, 0, MS_M3, MS_M1,  MS_NONE, 1);
        l.st[5] = mk(4, 4, 128, 256, 1, 1, 1, 0, 0, MS_M1, MS_OUT, MS_M4,   1);
      end
      default: begin  // layer 14: conv66, average pool, fully connected
        l.nst = 2; l.pc = 8; l.pf = 8;
        l.st[0] = mk(4, 4, 256, 128, 1, 1, 1, 0, 0, MS_M1,   MS_POOL, MS_NONE, 1);
        l.st[1] = mk(1, 1, 128,  10, 1, 1, 1, 0, 0, MS_PMEM, MS_OUT,  MS_NONE, 0);
      end
    endcase
    return l;
  endfunction

  // ---- sizes derived from a layer description -------------------------------

  // weight words (one word = pc weights) used by stage s of a layer
  function automatic int stage_wwords(layer_t l, int s);
    return cdiv(int'(l.st[s].co), int'(l.pf)) * cdiv(int'(l.st[s].ci), int'(l.pc))
           * int'(l.st[s].kh) * int'(l.st[s].kw);
  endfunction

  function automatic int stage_wbase(layer_t l, int s);
    int b = 0;
    for (int k = 0; k < s; k++) b += stage_wwords(l, k);
    return b;
  endfunction

  function automatic int stage_bbase(layer_t l, int s);
    int b = 0;
    for (int k = 0; k < s; k++) b += cdiv(int'(l.st[k].co), int'(l.pf));
    return b;
  endfunction

  function automatic int layer_wdepth(layer_t l);
    return stage_wbase(l, int'(l.nst));
  endfunction

  function automatic int layer_bdepth(layer_t l);
    return stage_bbase(l, int'(l.nst));
  endfunction

  // words per bank memory m needs, with 'banks' banks (channel c lives in
  // bank c % banks at row c / banks)
  function automatic int mem_depth(layer_t l, mem_sel_e m, int banks);
    int d = 1;
    for (int s = 0; s < int'(l.nst); s++) begin
      if (l.st[s].src == m || l.st[s].skip == m || (m == MS_M2 && s == 0))
        d = imax(d, cdiv(int'(l.st[s].ci), banks) * int'(l.st[s].wi) * int'(l.st[s].hi));
      if (l.st[s].dst == m || l.st[s].skip == m)
        d = imax(d, cdiv(int'(l.st[s].co), banks) * out_w(l.st[s]) * out_h(l.st[s]));
    end
    // M2 holds a copy of the layer input
    if (m == MS_M2)
      d = imax(d, cdiv(int'(l.st[0].ci), banks) * int'(l.st[0].wi) * int'(l.st[0].hi));
    return d;
  endfunction

  function automatic bit layer_uses(layer_t l, mem_sel_e m);
    for (int s = 0; s < int'(l.nst); s++)
      if (l.st[s].src == m || l.st[s].dst == m || l.st[s].skip == m) return 1'b1;
    return 1'b0;
  endfunction

  // lanes of the layer's memories: wide enough for the previous layer's
  // filter outputs, this layer's channel reads and this layer's filter writes
  function automatic int layer_lanes(int i);
    layer_t l = net_layer(i);
    int n = imax(int'(l.pc), int'(l.pf));
    if (i > 0) n = imax(n, int'(net_layer(i - 1).pf));
    return n;
  endfunction

  // total pipeline depth of conv_filter for n parallel channels
  function automatic int filter_latency(int n);
    return 3 + $clog2(n);
  endfunction

  // trim an accumulator value to the stored width (saturating)
  function automatic logic signed [DATA_W-1:0] sat16(logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(signed'(16'h7fff))) return 16'sh7fff;
    if (v < ACC_W'(signed'(16'h8000))) return 16'sh8000;
    return v[DATA_W-1:0];
  endfunction

endpackage
