// simultaneous_memory: dual-port RAM with one write port and one read port.
//
// This is a true dual-port block RAM used with port A only for writing
// (addr A + WE) and port B only for reading (addr B + RE), so that one layer
// can store its results while the next layer reads the same memory in the
// same cycle. Both ports are synchronous to one clock; a read returns the
// word one cycle after RE. A read of the address being written in the same
// cycle returns the old word (read-first). The read register holds its value
// while RE is low. Contents are not reset.
module simultaneous_memory #(
  parameter int W     = 16,
  parameter int DEPTH = 1024,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
