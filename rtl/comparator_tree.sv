// comparator_tree: pipelined arg-max over the class scores.
//
// N signed scores enter together with in_valid. They are compared pairwise
// in a tree; each level keeps the larger value and its index (the lower index
// wins a tie) and is followed by a register, so the index of the largest
// score, CLASS_W bits wide, appears clog2(N) cycles later with out_valid.
// In the accelerator it turns the 10 fully-connected outputs into the
// predicted CIFAR-10 class. A comparator tree with a 4-bit index output follows
// the original design; a register on every level and the tie rule are this
// design's own choices.
module comparator_tree #(
  parameter int N  = 10,
  parameter int W  = 18,
  parameter int IW = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data [N],
  output logic                out_valid,
  output logic [IW-1:0]       out_index,
  output logic signed [W-1:0] out_max
);
  localparam int LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int NP = 1 << LEVELS;

  logic signed [W-1:0] val [LEVELS+1][NP];
  logic [IW-1:0]       idx [LEVELS+1][NP];
  logic                ok  [LEVELS+1][NP];   // slot holds a real score
  logic                vld [LEVELS+1];

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      val[0][i] = (i < N) ? in_data[i] : '0;
      idx[0][i] = IW'(i);
      ok[0][i]  = (i < N);
    end
    vld[0] = in_valid;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int CNT = NP >> (l + 1);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[l+1] <= 1'b0;
        for (int i = 0; i < NP; i++) begin
          val[l+1][i] <= '0; idx[l+1][i] <= '0; ok[l+1][i] <= 1'b0;
        end
      end else begin
        vld[l+1] <= vld[l];
        for (int i = 0; i < NP; i++) begin
          if (i < CNT) begin
            // take the right operand only if it is real and strictly larger
            if (ok[l][2*i+1] && (!ok[l][2*i] || val[l][2*i+1] > val[l][2*i])) begin
              val[l+1][i] <= val[l][2*i+1];
              idx[l+1][i] <= idx[l][2*i+1];
            end else begin
              val[l+1][i] <= val[l][2*i];
              idx[l+1][i] <= idx[l][2*i];
            end
            ok[l+1][i] <= ok[l][2*i] | ok[l][2*i+1];
          end else begin
            val[l+1][i] <= '0; idx[l+1][i] <= '0; ok[l+1][i] <= 1'b0;
          end
        end
      end
    end
  end

  assign out_valid = vld[LEVELS];
  assign out_index = idx[LEVELS][0];
  assign out_max   = val[LEVELS][0];
endmodule
