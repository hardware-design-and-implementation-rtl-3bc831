// layer_controller: counter-based sequencer of one layer's convolution stages.
//
// After 'start' the controller walks through the stages of its layer (from
// the CFG table). Within a stage it runs nested up-counters, innermost first:
//   k  (kernel column), j (kernel row), cg (input-channel group of PC lanes),
//   y  (output column), x (output row), fg (output-filter group of PF lanes).
// Every cycle it issues one tap: the input pixel (x*S + j - PH, y*S + k - PW)
// of channels cg*PC.., a 'pad' flag when that pixel lies in the zero padding,
// the weight word ((fg*CG + cg)*KH + j)*KW + k (plus the stage's base) and the
// bias entry of filter group fg. 'first' and 'last' mark the first and last
// tap of an output pixel; the output address (pixel x*WO + y, channels
// fg*PF..) is issued with it, and the layer delays it alongside the data, as
// the original design delays the input address by register to form the output one.
// When a stage has issued its last tap, a drain counter R waits DRAIN cycles
// so that the last results reach memory before the next stage reads them;
// after the last stage 'done' pulses for one cycle.
//
// The loop order (k, j, then the output position) and the wait of R for the
// adder-tree stages are the original design's; the channel-group and filter-group
// counters and the stage sequencing are this design's.
module layer_controller
  import sqnxt_pkg::*;
#(
  parameter layer_t CFG   = net_layer(3),
  parameter int     WAW   = 16,   // weight address width
  parameter int     BAW   = 8,    // bias address width
  parameter int     DRAIN = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // tap issue
  output logic           iss_valid,
  output logic           iss_first,
  output logic           iss_last,
  output logic [2:0]     iss_stage,
  output mem_sel_e       iss_src,
  output logic [15:0]    iss_ch,     // first input channel of the group
  output logic [15:0]    iss_ci,     // channels of the stage (lane mask)
  output logic [15:0]    iss_pix,
  output logic [15:0]    iss_hw,
  output logic           iss_pad,
  output logic [WAW-1:0] iss_waddr,
  output logic [BAW-1:0] iss_baddr,
  // output position of the tap's result
  output logic [15:0]    iss_opix,
  output logic [15:0]    iss_och,
  output logic [15:0]    iss_oco,
  output logic [15:0]    iss_ohw,
  output mem_sel_e       iss_dst,
  output mem_sel_e       iss_skip,
  output logic           iss_relu
);
  localparam int PC = int'(CFG.pc);
  localparam int PF = int'(CFG.pf);
  localparam int NST = int'(CFG.nst);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [2:0]  st;
  logic [15:0] fg, x, y, cg;
  logic [3:0]  j, k;
  logic [7:0]  r;

  stage_t cur;
  int wo, ho, cgn, fgn, wbase, bbase;
  always_comb begin
    cur = CFG.st[st];
    wo  = out_w(cur);
    ho  = out_h(cur);
    cgn = cdiv(int'(cur.ci), PC);
    fgn = cdiv(int'(cur.co), PF);
    wbase = 0;
    bbase = 0;
    for (int s = 0; s < MAX_STAGES; s++) begin
      if (s < int'(st)) begin
        wbase += stage_wwords(CFG, s);
        bbase += cdiv(int'(CFG.st[s].co), PF);
      end
    end
  end

  logic k_end, j_end, cg_end, y_end, x_end, fg_end;
  assign k_end  = (int'(k)  == int'(cur.kw) - 1);
  assign j_end  = (int'(j)  == int'(cur.kh) - 1);
  assign cg_end = (int'(cg) == cgn - 1);
  assign y_end  = (int'(y)  == wo - 1);
  assign x_end  = (int'(x)  == ho - 1);
  assign fg_end = (int'(fg) == fgn - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      st <= '0; fg <= '0; x <= '0; y <= '0; cg <= '0; j <= '0; k <= '0; r <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          st <= '0; fg <= '0; x <= '0; y <= '0; cg <= '0; j <= '0; k <= '0;
        end
        S_RUN: begin
          k <= k_end ? '0 : k + 1'b1;
          if (k_end) begin
            j <= j_end ? '0 : j + 1'b1;
            if (j_end) begin
              cg <= cg_end ? '0 : cg + 1'b1;
              if (cg_end) begin
                y <= y_end ? '0 : y + 1'b1;
                if (y_end) begin
                  x <= x_end ? '0 : x + 1'b1;
                  if (x_end) begin
                    fg <= fg_end ? '0 : fg + 1'b1;
                    if (fg_end) begin
                      state <= S_DRAIN;
                      r <= '0;
                    end
                  end
                end
              end
            end
          end
        end
        S_DRAIN: begin
          r <= r + 1'b1;
          if (int'(r) == DRAIN - 1) begin
            if (int'(st) == NST - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              st    <= st + 1'b1;
              state <= S_RUN;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // tap issue (combinational from the counters)
  int irow, icol;
  always_comb begin
    irow = int'(x) * int'(cur.s) + int'(j) - int'(cur.ph);
    icol = int'(y) * int'(cur.s) + int'(k) - int'(cur.pw);
    iss_valid = (state == S_RUN);
    iss_first = (cg == '0) && (j == '0) && (k == '0);
    iss_last  = cg_end && j_end && k_end;
    iss_stage = st;
    iss_src   = cur.src;
    iss_ch    = 16'(int'(cg) * PC);
    iss_ci    = cur.ci;
    iss_pad   = (irow < 0) || (irow >= int'(cur.hi)) || (icol < 0) || (icol >= int'(cur.wi));
    iss_pix   = iss_pad ? '0 : 16'(irow * int'(cur.wi) + icol);
    iss_hw    = 16'(int'(cur.wi) * int'(cur.hi));
    iss_waddr = WAW'(wbase + ((int'(fg) * cgn + int'(cg)) * int'(cur.kh) + int'(j)) * int'(cur.kw) + int'(k));
    iss_baddr = BAW'(bbase + int'(fg));
    iss_opix  = 16'(int'(x) * wo + int'(y));
    iss_och   = 16'(int'(fg) * PF);
    iss_oco   = cur.co;
    iss_ohw   = 16'(wo * ho);
    iss_dst   = cur.dst;
    iss_skip  = cur.skip;
    iss_relu  = cur.relu;
  end
endmodule
