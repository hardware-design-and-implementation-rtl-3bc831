// adder_tree: pipelined adder tree summing N signed operands.
//
// The inputs are added pairwise; every level of adders is followed by a rank
// of registers, so a new set of N operands is accepted every cycle and the
// sum appears LEVELS = clog2(N) cycles later (0 cycles, i.e. combinational,
// for N = 1). Operand counts that are not a power of two are padded with
// zeros. Sums keep the operand width W and wrap, as the filters size W so
// that the layer totals fit. A valid bit travels with the data.
//
// The original design builds one such tree per filter (for 16, 8, 4 and 3 parallel
// channels) and registers each level to break the long carry chains; the
// binary arrangement and the zero padding are this design's choice.
module adder_tree #(
  parameter int N = 16,
  parameter int W = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data [N],
  output logic                out_valid,
  output logic signed [W-1:0] out_sum
);
  localparam int LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int NP = 1 << LEVELS;

  logic signed [W-1:0] lvl [LEVELS+1][NP];
  logic                vld [LEVELS+1];

  always_comb begin
    for (int i = 0; i < NP; i++) lvl[0][i] = (i < N) ? in_data[i] : '0;
    vld[0] = in_valid;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int CNT = NP >> (l + 1);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[l+1] <= 1'b0;
        for (int i = 0; i < NP; i++) lvl[l+1][i] <= '0;
      end else begin
        vld[l+1] <= vld[l];
        for (int i = 0; i < NP; i++)
          lvl[l+1][i] <= (i < CNT) ? lvl[l][2*i] + lvl[l][2*i+1] : '0;
      end
    end
  end

  assign out_sum   = lvl[LEVELS][0];
  assign out_valid = vld[LEVELS];
endmodule
