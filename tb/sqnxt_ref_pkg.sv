// sqnxt_ref_pkg: bit-exact behavioural reference of the accelerator's
// arithmetic, used by the testbenches to compute expected results
// independently of the RTL.
//
// Feature maps are flat int arrays indexed [c*H*W + row*W + col]. A
// convolution output is wrap18(bias + sum(trunc18((x*w) >>> 13))) (+ the
// shortcut operand), then ReLU, then saturation to 16 bits, which is the
// hardware's result whatever order its adder trees use, because 18-bit wrap-
// around sums do not depend on order. Weights, biases and image pixels are
// generated by a hash of their indices so no data files are needed.
package sqnxt_ref_pkg;
  import sqnxt_pkg::*;

  function automatic int wrap18(longint v);
    longint m = v & 64'h3ffff;
    return (m >= 64'h20000) ? int'(m - 64'h40000) : int'(m);
  endfunction

  function automatic int sat16i(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int prod18(int x, int w);
    longint p = longint'(x) * longint'(w);
    return wrap18(p >>> 13);
  endfunction

  // 32-bit mixing hash
  function automatic int unsigned hmix(int unsigned a);
    a = a ^ (a >> 16); a = a * 32'h7feb352d;
    a = a ^ (a >> 15); a = a * 32'h846ca68b;
    a = a ^ (a >> 16);
    return a;
  endfunction

  function automatic int unsigned h6(int a, int b, int c, int d, int e, int f);
    int unsigned h = 32'h9e3779b9;
    h = hmix(h ^ a); h = hmix(h ^ b); h = hmix(h ^ c);
    h = hmix(h ^ d); h = hmix(h ^ e); h = hmix(h ^ f);
    return h;
  endfunction

  // weight of layer li, stage s, filter o, channel c, tap (j,k): uniform in
  // about +-1.7/sqrt(fan-in) so activations keep a useful range
  function automatic int wgen(int li, int s, int o, int c, int j, int k, int fanin);
    int a = int'(8192.0 * 1.7 / $sqrt(real'(fanin)));
    int unsigned h = h6(li, s, o, c, j * 16 + k, 1);
    return int'(h % (2 * a + 1)) - a;
  endfunction

  function automatic int bgen(int li, int s, int o);
    int unsigned h = h6(li, s, o, 0, 0, 2);
    return int'(h % 1601) - 800;   // about +-0.1
  endfunction

  function automatic int pgen(int img, int c, int p);
    return int'(h6(img, c, p, 0, 0, 3) % 8192);   // [0, 1)
  endfunction

  // one convolution stage
  function automatic void conv(input int li, input int si, input stage_t st,
                               input int src[], input int skp[], input bit has_skip,
                               output int dst[]);
    int wo = out_w(st), ho = out_h(st);
    int ci = int'(st.ci), co = int'(st.co), wi = int'(st.wi), hi = int'(st.hi);
    int fanin = ci * int'(st.kw) * int'(st.kh);
    dst = new[co * wo * ho];
    for (int o = 0; o < co; o++)
      for (int y = 0; y < ho; y++)
        for (int x = 0; x < wo; x++) begin
          longint acc = bgen(li, si, o);
          int v;
          for (int c = 0; c < ci; c++)
            for (int j = 0; j < int'(st.kh); j++)
              for (int k = 0; k < int'(st.kw); k++) begin
                int r = y * int'(st.s) + j - int'(st.ph);
                int q = x * int'(st.s) + k - int'(st.pw);
                if (r >= 0 && r < hi && q >= 0 && q < wi)
                  acc += prod18(src[c*hi*wi + r*wi + q], wgen(li, si, o, c, j, k, fanin));
              end
          v = wrap18(acc);
          if (has_skip) v = wrap18(longint'(v) + skp[o*wo*ho + y*wo + x]);
          if (st.relu && v < 0) v = 0;
          dst[o*wo*ho + y*wo + x] = sat16i(v);
        end
  endfunction

  // whole layer; returns its output (or the 10 scores for the last layer)
  function automatic void run_layer(input int li, input layer_t l, input int in_map[],
                                    output int out_map[]);
    int m1[], m2[], m3[], m4[], pm[], res[], empty[];
    m1 = in_map; m2 = in_map;
    for (int s = 0; s < int'(l.nst); s++) begin
      stage_t st = l.st[s];
      int src[], skp[];
      case (st.src)
        MS_M1: src = m1;  MS_M2: src = m2;  MS_M3: src = m3;
        MS_PMEM: src = pm; default: src = empty;
      endcase
      case (st.skip)
        MS_M2: skp = m2;  MS_M4: skp = m4;  default: skp = empty;
      endcase
      conv(li, s, st, src, skp, st.skip != MS_NONE, res);
      case (st.dst)
        MS_M1: m1 = res;  MS_M3: m3 = res;  MS_M4: m4 = res;
        MS_POOL: begin
          int n = out_w(st) * out_h(st);
          pm = new[int'(st.co)];
          for (int c = 0; c < int'(st.co); c++) begin
            int sum = 0;
            for (int p = 0; p < n; p++) sum += res[c*n + p];
            pm[c] = sum >>> $clog2(n);
          end
        end
        default: out_map = res;
      endcase
    end
  endfunction

  // load order helpers
  function automatic int w_addr(layer_t l, int s, int o, int c, int j, int k);
    int cgn = cdiv(int'(l.st[s].ci), int'(l.pc));
    int fg = o / int'(l.pf), cg = c / int'(l.pc);
    return stage_wbase(l, s) + ((fg * cgn + cg) * int'(l.st[s].kh) + j) * int'(l.st[s].kw) + k;
  endfunction

  function automatic int b_addr(layer_t l, int s, int o);
    return stage_bbase(l, s) + o / int'(l.pf);
  endfunction
endpackage
