// sqnxt_top: layer-pipelined SqueezeNext-14 accelerator for 32x32 RGB
// (CIFAR-10) images.
//
// Fourteen hardware layers, one per SqueezeNext block (see sqnxt_pkg), are
// chained: each layer writes its output straight into the next layer's input
// memories, and the stall controller starts every layer as soon as its input
// is complete and its output memory is free, freezing it (gated clock)
// otherwise. Successive images are therefore processed by different layers
// at the same time. The image controller loads pixels into layer 1; layer 14
// ends with average pooling and the fully connected layer, whose 10 scores
// are held in registers and reduced by the comparator tree to the 4-bit class
// index on class_idx, with class_valid and the image's sequence number.
//
// Interface: a pixel stream (img_*, valid/ready, 3 channels of Q3.13 per
// pixel, row-major, img_last on pixel 1023); a weight-load port (wl_*) and a
// bias-load port (bl_*) addressed by layer, filter lane, channel lane and
// word (layout in sqnxt_layer / sqnxt_pkg); parameters must be loaded before
// the first image. Per-layer busy and stalled flags are brought out for
// observation.
//
// Lint notes: each layer's own 'busy' output is left open because the stall
// controller already holds that state (it drives layer_busy); the
// sync-and-async warning on rst_n comes from the stall controller's
// assertion, not from the circuit.
module sqnxt_top
  import sqnxt_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // image stream
  input  logic                     img_valid,
  output logic                     img_ready,
  input  logic [15:0]              img_pix,
  input  logic signed [DATA_W-1:0] img_data [3],
  input  logic                     img_last,
  // parameter loading
  input  logic                     wl_we,
  input  logic [3:0]               wl_layer,
  input  logic [7:0]               wl_lane_f,
  input  logic [7:0]               wl_lane_c,
  input  logic [15:0]              wl_addr,
  input  logic signed [DATA_W-1:0] wl_data,
  input  logic                     bl_we,
  input  logic [3:0]               bl_layer,
  input  logic [7:0]               bl_lane,
  input  logic [7:0]               bl_addr,
  input  logic signed [ACC_W-1:0]  bl_data,
  // result
  output logic                     class_valid,
  output logic [CLASS_W-1:0]       class_idx,
  output logic [15:0]              class_img_id,
  output logic signed [DATA_W-1:0] scores [NUM_CLASSES],
  // observation
  output logic [NUM_LAYERS-1:0]    layer_busy,
  output logic [NUM_LAYERS-1:0]    layer_stalled
);
  localparam int NL = NUM_LAYERS;
  localparam int ML = 64;   // widest layer-to-layer write

  // layer-to-layer write buses
  logic                     lw_we   [NL+1];
  logic [ML-1:0]            lw_mask [NL+1];
  logic [15:0]              lw_ch   [NL+1];
  logic [15:0]              lw_pix  [NL+1];
  logic [15:0]              lw_hw   [NL+1];
  logic signed [DATA_W-1:0] lw_data [NL+1][ML];

  logic [NL-1:0] l_start, l_en, l_full, l_busy, l_done;
  logic          img_loaded;

  // ---------------------------------------------------------------- images
  logic [2:0]               im_mask;
  logic signed [DATA_W-1:0] im_data [3];
  logic                     res_valid;
  logic [15:0]              images_in, images_out;

  image_controller #(.HW(1024), .CH(3)) u_img (
    .clk(clk), .rst_n(rst_n),
    .img_valid(img_valid), .img_ready(img_ready), .img_pix(img_pix),
    .img_data(img_data), .img_last(img_last),
    .in_full(l_full[0]), .mem_we(lw_we[0]), .mem_wmask(im_mask), .mem_ch(lw_ch[0]),
    .mem_pix(lw_pix[0]), .mem_hw(lw_hw[0]), .mem_wdata(im_data),
    .img_loaded(img_loaded),
    .res_valid(res_valid), .res_id(class_img_id),
    .images_in(images_in), .images_out(images_out)
  );

  always_comb begin
    lw_mask[0] = ML'(im_mask);
    for (int l = 0; l < ML; l++) lw_data[0][l] = (l < 3) ? im_data[l % 3] : '0;
  end

  // ---------------------------------------------------------------- stall controller
  stall_controller #(.NL(NL)) u_stall (
    .clk(clk), .rst_n(rst_n), .img_loaded(img_loaded), .layer_done(l_done),
    .start(l_start), .en(l_en), .full(l_full), .busy(l_busy), .stalled(layer_stalled)
  );
  assign layer_busy = l_busy;

  // ---------------------------------------------------------------- layers
  for (genvar i = 0; i < NL; i++) begin : g_layer
    localparam layer_t CFG = net_layer(i);
    localparam int PF  = int'(CFG.pf);
    localparam int INL = (i == 0) ? 3 : int'(net_layer((i + NL - 1) % NL).pf);
    localparam int WD  = layer_wdepth(CFG);
    localparam int BD  = layer_bdepth(CFG);
    localparam int WAW = (WD > 1) ? $clog2(WD) : 1;
    localparam int BAW = (BD > 1) ? $clog2(BD) : 1;

    logic signed [DATA_W-1:0] in_d  [INL];
    logic signed [DATA_W-1:0] out_d [PF];
    logic [PF-1:0]            out_m;

    always_comb for (int l = 0; l < INL; l++) in_d[l] = lw_data[i][l];

    sqnxt_layer #(.CFG(CFG), .IN_LANES(INL)) u_layer (
      .clk(clk), .rst_n(rst_n), .en(l_en[i]), .start(l_start[i]),
      .busy(), .done(l_done[i]),
      .in_we(lw_we[i]), .in_wmask(lw_mask[i][INL-1:0]), .in_ch(lw_ch[i]),
      .in_pix(lw_pix[i]), .in_hw(lw_hw[i]), .in_wdata(in_d),
      .wl_we(wl_we && int'(wl_layer) == i), .wl_lane_f(wl_lane_f), .wl_lane_c(wl_lane_c),
      .wl_addr(wl_addr[WAW-1:0]), .wl_data(wl_data),
      .bl_we(bl_we && int'(bl_layer) == i), .bl_lane(bl_lane), .bl_addr(bl_addr[BAW-1:0]),
      .bl_data(bl_data),
      .out_we(lw_we[i+1]), .out_wmask(out_m), .out_ch(lw_ch[i+1]), .out_pix(lw_pix[i+1]),
      .out_hw(lw_hw[i+1]), .out_wdata(out_d)
    );

    always_comb begin
      lw_mask[i+1] = ML'(out_m);
      for (int l = 0; l < ML; l++) lw_data[i+1][l] = (l < PF) ? out_d[l % PF] : '0;
    end
  end

  // ---------------------------------------------------------------- class scores
  logic cmp_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CLASSES; c++) scores[c] <= '0;
      cmp_valid <= 1'b0;
    end else begin
      if (lw_we[NL])
        for (int l = 0; l < ML; l++)
          if (lw_mask[NL][l] && int'(lw_ch[NL]) + l < NUM_CLASSES)
            scores[(int'(lw_ch[NL]) + l) % NUM_CLASSES] <= lw_data[NL][l];
      cmp_valid <= l_busy[NL-1] && l_done[NL-1];
    end
  end

  comparator_tree #(.N(NUM_CLASSES), .W(DATA_W), .IW(CLASS_W)) u_cmp (
    .clk(clk), .rst_n(rst_n), .in_valid(cmp_valid), .in_data(scores),
    .out_valid(res_valid), .out_index(class_idx), .out_max()
  );
  assign class_valid = res_valid;
endmodule
