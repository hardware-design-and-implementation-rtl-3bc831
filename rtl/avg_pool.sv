// avg_pool: global average pooling by accumulate-and-shift.
//
// LANES accumulators each add one value per valid cycle; after N values
// (N = 2**SHIFT, the 4x4 = 16 pixels of one channel in this network) each
// accumulator is divided by N with an arithmetic right shift by SHIFT and
// the LANES averages are presented with out_valid together with the channel
// base of the group, ready to be stored in the pooled-vector register file.
// The accumulators restart for the next channel group. One value per lane
// and cycle goes in; the averages leave one cycle after the N-th value.
//
// The accumulator-then-shift structure and the 8 accumulators are the
// original design's; the channel-base tag and the accumulator width (DATA_W+SHIFT
// bits, so no overflow) are this design's.
module avg_pool
  import sqnxt_pkg::*;
#(
  parameter int LANES = 8,
  parameter int SHIFT = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [15:0]              in_ch,      // channel base of the group
  input  logic signed [DATA_W-1:0] in_data [LANES],
  output logic                     out_valid,
  output logic [15:0]              out_ch,
  output logic signed [DATA_W-1:0] out_data [LANES]
);
  localparam int N = 1 << SHIFT;
  localparam int AW = DATA_W + SHIFT;

  logic signed [AW-1:0] acc [LANES];
  logic [SHIFT-1:0]     cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      out_valid <= 1'b0;
      out_ch <= '0;
      for (int l = 0; l < LANES; l++) begin acc[l] <= '0; out_data[l] <= '0; end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        for (int l = 0; l < LANES; l++) begin
          logic signed [AW-1:0] sum;
          sum = ((cnt == '0) ? AW'(0) : acc[l]) + AW'(in_data[l]);
          acc[l] <= sum;
          if (int'(cnt) == N - 1) out_data[l] <= DATA_W'(sum >>> SHIFT);
        end
        if (int'(cnt) == N - 1) begin
          out_valid <= 1'b1;
          out_ch    <= in_ch;
        end
      end
    end
  end
endmodule
