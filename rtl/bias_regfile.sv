// bias_regfile: register file of 18-bit biases for one filter lane.
//
// One entry per output-filter group the lane computes over the layer's
// stages (the folded batch-normalisation offset of that filter). Written one
// entry at a time before inference; read combinationally, because the value
// is only sampled together with the first tap of each output. Registers
// rather than RAM, as the original design keeps biases in registers.
module bias_regfile
  import sqnxt_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic signed [ACC_W-1:0] wdata,
  input  logic [AW-1:0]           raddr,
  output logic signed [ACC_W-1:0] rdata
);
  logic signed [ACC_W-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we && int'(waddr) < DEPTH) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < DEPTH) ? regs[raddr] : '0;
endmodule
