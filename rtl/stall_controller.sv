// stall_controller: starts and freezes the layers of the pipeline.
//
// Between layer i-1 and layer i sits layer i's input memory; full[i] says it
// holds a feature map that layer i has not finished with yet. Layer i is
// started (a one-cycle 'start' with its clock enabled) when its input is full,
// it is idle, and the input memory of layer i+1 is free, so that it can
// write its results there. While a layer runs its clock enable 'en' stays
// high; when the layer reports 'done' the controller frees its input
// (full[i] = 0), marks the next layer's input full and freezes the layer
// (en = 0, which stops its gated clock) until its next image. full[0] is set
// by the image controller when a whole image is loaded. Different layers
// thus work on different images at the same time (pipelined inference).
// 'stalled[i]' is high while layer i has an input but must wait for layer
// i+1 to free its memory.
//
// The original design drives the same start/freeze decisions from a fixed table of
// cycle counts tuned to its layers' latencies, and starts some layers before
// their predecessor has finished; this design derives them from the
// memories' full/free state instead, which needs no retuning when a layer's
// latency changes, at the cost of that partial overlap.
//
// Lint note: rst_n is both the asynchronous reset of the flags and the
// 'disable iff' of the start/busy assertion; the resulting sync-and-async
// warning concerns only the assertion, not the circuit.
module stall_controller #(
  parameter int NL = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          img_loaded,     // layer 0's input memory was filled
  input  logic [NL-1:0] layer_done,
  output logic [NL-1:0] start,
  output logic [NL-1:0] en,
  output logic [NL-1:0] full,
  output logic [NL-1:0] busy,
  output logic [NL-1:0] stalled
);
  logic [NL-1:0] can_start;

  always_comb begin
    for (int i = 0; i < NL; i++) begin
      logic out_free;
      out_free     = (i == NL - 1) ? 1'b1 : !full[(i + 1) % NL];
      can_start[i] = full[i] && !busy[i] && !start[i] && out_free;
      stalled[i]   = full[i] && !busy[i] && !start[i] && !out_free;
    end
    en = busy | start;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start <= '0;
      busy  <= '0;
      full  <= '0;
    end else begin
      logic [NL-1:0] nfull;
      nfull = full;
      if (img_loaded) nfull[0] = 1'b1;
      for (int i = 0; i < NL; i++) begin
        if (start[i]) busy[i] <= 1'b1;
        if (busy[i] && layer_done[i]) begin
          busy[i]  <= 1'b0;
          nfull[i] = 1'b0;
          if (i < NL - 1) nfull[(i + 1) % NL] = 1'b1;
        end
      end
      full  <= nfull;
      start <= can_start;
    end
  end

  // a layer is never started twice without finishing in between
  assert property (@(posedge clk) disable iff (!rst_n) (start & busy) == '0);
endmodule
