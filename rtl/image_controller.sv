// image_controller: feeds images into the first layer and tags the results.
//
// Images arrive as a pixel stream (valid/ready): one pixel per beat, its
// three colour channels side by side, pixels in row-major order, img_last
// on the final pixel. Each accepted beat is written into the first layer's
// input memory (channels 0..2 of pixel img_pix). After the last pixel the
// controller reports 'img_loaded' so the stall controller can start the
// first layer; ready stays low until that layer has released its input
// memory, so the next image is loaded while the later layers still work on
// earlier ones. Every classification that leaves the pipeline gets the
// sequence number of its image (images leave in the order they entered).
//
// The original design states that several images are inferred one after another
// through the pipeline; the stream interface and the numbering are this
// design's.
//
// mem_wmask, mem_ch and mem_hw are constants (all lanes, channel 0, HW
// pixels): they give the first layer's input port the same shape as the
// ports between layers. mem_pix and mem_wdata pass the beat through.
module image_controller
  import sqnxt_pkg::*;
#(
  parameter int HW = 1024,    // pixels per image
  parameter int CH = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // pixel stream
  input  logic                     img_valid,
  output logic                     img_ready,
  input  logic [15:0]              img_pix,
  input  logic signed [DATA_W-1:0] img_data [CH],
  input  logic                     img_last,
  // first layer's input memory
  input  logic                     in_full,     // layer 0 input still in use
  output logic                     mem_we,
  output logic [CH-1:0]            mem_wmask,
  output logic [15:0]              mem_ch,
  output logic [15:0]              mem_pix,
  output logic [15:0]              mem_hw,
  output logic signed [DATA_W-1:0] mem_wdata [CH],
  output logic                     img_loaded,
  // results
  input  logic                     res_valid,
  output logic [15:0]              res_id,      // number of the image the result belongs to
  output logic [15:0]              images_in,
  output logic [15:0]              images_out
);
  logic pend;   // img_loaded issued, full flag not yet visible

  assign img_ready = !in_full && !pend;

  always_comb begin
    mem_we    = img_valid && img_ready;
    mem_wmask = '1;
    mem_ch    = '0;
    mem_pix   = img_pix;
    mem_hw    = 16'(HW);
    for (int c = 0; c < CH; c++) mem_wdata[c] = img_data[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_loaded <= 1'b0;
      pend       <= 1'b0;
      images_in  <= '0;
      images_out <= '0;
    end else begin
      img_loaded <= 1'b0;
      if (pend && in_full) pend <= 1'b0;
      if (img_valid && img_ready && img_last) begin
        img_loaded <= 1'b1;
        pend       <= 1'b1;
        images_in  <= images_in + 1'b1;
      end
      if (res_valid) images_out <= images_out + 1'b1;
    end
  end

  assign res_id = images_out;
endmodule
