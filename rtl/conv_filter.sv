// conv_filter: one convolution filter with N parallel input channels.
//
// Each cycle the filter takes N feature-map values and the N matching
// weights (one kernel tap of N channels), multiplies them and reduces the
// products with a pipelined adder tree; an accumulator then sums successive
// trees over all taps and channel groups of one output pixel. The
// accumulator is preset with the bias on the first tap (the batch
// normalisation offset is folded into that bias), so when the last tap
// arrives the register holds bias + sum(x * w).
//
// Pipeline (cycles after the inputs): 1 input register (operand isolation of
// the multipliers), 1 product register, clog2(N) adder-tree levels, 1
// accumulator. out_valid pulses for one cycle, filter_latency(N) cycles after
// the 'last' input, with out_acc holding the result.
//
// Number formats follow the package: 16-bit Q3.13 operands, products cut to
// 18 bits with 13 fraction bits (floor), 18-bit adder tree, accumulator and
// bias. The 18-bit internal width is the original design's; rounding by truncation
// and wrap-around inside the 18 bits are this design's choice.
module conv_filter
  import sqnxt_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,   // first tap of an output
  input  logic                     in_last,    // last tap of an output
  input  logic signed [DATA_W-1:0] in_x [N],
  input  logic signed [DATA_W-1:0] in_w [N],
  input  logic signed [ACC_W-1:0]  in_bias,    // used with in_first
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out_acc
);
  localparam int PW = 2 * DATA_W;

  // operand isolation registers
  logic signed [DATA_W-1:0] x_q [N];
  logic signed [DATA_W-1:0] w_q [N];
  logic                     v_q, f_q, l_q;
  logic signed [ACC_W-1:0]  b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; f_q <= 1'b0; l_q <= 1'b0; b_q <= '0;
      for (int i = 0; i < N; i++) begin x_q[i] <= '0; w_q[i] <= '0; end
    end else begin
      v_q <= in_valid;
      f_q <= in_valid & in_first;
      l_q <= in_valid & in_last;
      b_q <= in_bias;
      if (in_valid)
        for (int i = 0; i < N; i++) begin x_q[i] <= in_x[i]; w_q[i] <= in_w[i]; end
    end
  end

  // multipliers
  logic signed [ACC_W-1:0] p_q [N];
  logic                    pv_q;
  localparam int TL = $clog2(N) + 1;  // product stage + tree levels
  logic [TL-1:0]           f_sh, l_sh;
  logic signed [ACC_W-1:0] b_sh [TL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv_q <= 1'b0;
      for (int i = 0; i < N; i++) p_q[i] <= '0;
    end else begin
      pv_q <= v_q;
      for (int i = 0; i < N; i++) begin
        logic signed [PW-1:0] p;
        p = x_q[i] * w_q[i];
        p_q[i] <= p[FRAC_W +: ACC_W];
      end
    end
  end

  // first/last/bias travel beside the product stage and the tree
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_sh <= '0; l_sh <= '0;
      for (int i = 0; i < TL; i++) b_sh[i] <= '0;
    end else begin
      f_sh <= TL'({f_sh, f_q});
      l_sh <= TL'({l_sh, l_q});
      b_sh[0] <= b_q;
      for (int i = 1; i < TL; i++) b_sh[i] <= b_sh[i-1];
    end
  end

  logic                    t_valid;
  logic signed [ACC_W-1:0] t_sum;

  adder_tree #(.N(N), .W(ACC_W)) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pv_q),
    .in_data  (p_q),
    .out_valid(t_valid),
    .out_sum  (t_sum)
  );

  // accumulator, preset with the bias on the first tap
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_acc   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= t_valid & l_sh[TL-1];
      if (t_valid) out_acc <= (f_sh[TL-1] ? b_sh[TL-1] : out_acc) + t_sum;
    end
  end
endmodule
