// data_memory: banked feature-map memory built from simultaneous memories.
//
// A feature map of C channels x HW pixels is spread over BANKS one-write
// one-read RAMs: channel c lives in bank (c % BANKS) at word
// (c / BANKS) * HW + pixel. A write stores up to LANES consecutive channels
// (ch_base .. ch_base+LANES-1, lane mask wmask) of one pixel in one cycle, and
// a read returns LANES consecutive channels of one pixel one cycle later, so
// a filter bank with LANES parallel channels or filters is fed every cycle.
// LANES must not exceed BANKS. HW is given with each access because one
// memory holds maps of different sizes over a layer's stages.
//
// Splitting one map over as many RAMs as the adder tree has inputs follows
// the original design; the interleaving by channel index is this design's choice.
module data_memory
  import sqnxt_pkg::*;
#(
  parameter int LANES = 16,
  parameter int BANKS = 16,
  parameter int DEPTH = 900,    // words per bank
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                     clk,
  // write port
  input  logic                     we,
  input  logic [LANES-1:0]         wmask,
  input  logic [15:0]              wch,
  input  logic [15:0]              wpix,
  input  logic [15:0]              whw,
  input  logic signed [DATA_W-1:0] wdata [LANES],
  // read port
  input  logic                     re,
  input  logic [15:0]              rch,
  input  logic [15:0]              rpix,
  input  logic [15:0]              rhw,
  output logic signed [DATA_W-1:0] rdata [LANES]
);
  logic [BANKS-1:0]        b_we;
  logic [AW-1:0]           b_waddr [BANKS];
  logic [DATA_W-1:0]       b_wdata [BANKS];
  logic [AW-1:0]           b_raddr [BANKS];
  logic [DATA_W-1:0]       b_rdata [BANKS];
  logic [15:0]             rch_q;

  // lane l of an access at channel base ch goes to bank (ch + l) % BANKS
  always_comb begin
    for (int b = 0; b < BANKS; b++) begin
      int wl, rl;
      int wrow, rrow;
      wl   = (b - int'(wch) % BANKS + BANKS) % BANKS;
      rl   = (b - int'(rch) % BANKS + BANKS) % BANKS;
      wrow = (int'(wch) + wl) / BANKS;
      rrow = (int'(rch) + rl) / BANKS;
      b_we[b]    = 1'b0;
      b_wdata[b] = '0;
      b_waddr[b] = AW'(wrow * int'(whw) + int'(wpix));
      b_raddr[b] = AW'(rrow * int'(rhw) + int'(rpix));
      for (int l = 0; l < LANES; l++) begin
        if (l == wl) begin
          b_we[b]    = we & wmask[l];
          b_wdata[b] = wdata[l];
        end
      end
    end
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    simultaneous_memory #(.W(DATA_W), .DEPTH(DEPTH), .AW(AW)) u_ram (
      .clk  (clk),
      .we   (b_we[b]),
      .waddr(b_waddr[b]),
      .wdata(b_wdata[b]),
      .re   (re),
      .raddr(b_raddr[b]),
      .rdata(b_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (re) rch_q <= rch;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      rdata[l] = signed'(b_rdata[(int'(rch_q) + l) % BANKS]);
  end
endmodule
