// weight_memory: distributed weight memory of one filter lane.
//
// Holds, for one of the parallel filters of a layer, every weight that lane
// uses over all stages of the layer. A word is N weights, one per parallel
// input channel, so one read feeds all multipliers of the filter. Reads are
// synchronous (data one cycle after the address). Weights are loaded one
// value at a time through the write port (word address + channel lane).
//
// The original design stores weights in small LUT-based ROMs per filter; making
// them writable (loaded before inference) is this design's choice, so that
// any trained parameter set can be used.
module weight_memory
  import sqnxt_pkg::*;
#(
  parameter int N     = 16,
  parameter int DEPTH = 8,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int LW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [LW-1:0]            wlane,
  input  logic signed [DATA_W-1:0] wdata,
  input  logic                     re,
  input  logic [AW-1:0]            raddr,
  output logic signed [DATA_W-1:0] rdata [N]
);
  logic [DATA_W-1:0] mem [N][DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH && int'(wlane) < N) mem[wlane][waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re)
      for (int i = 0; i < N; i++)
        rdata[i] <= (int'(raddr) < DEPTH) ? signed'(mem[i][raddr]) : '0;
  end
endmodule
