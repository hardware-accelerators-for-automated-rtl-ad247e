// surveillance_top: the hardware accelerator chain of the automated
// surveillance system.
//
// A segmentation unit (outside this design) delivers a binary motion mask,
// one bit per pixel in raster order, on its own fast clock (100 MHz in the
// prototype). An asynchronous FIFO brings the mask into the processing clock
// domain (67 MHz in the prototype, the labeling unit's limit), shared by the
// morphology cascade and the labeling unit. The morphology cascade filters the
// mask (by default two units: an erosion followed by a dilation, i.e. an
// opening, which removes noise clusters smaller than the SE); the labeling
// unit gives each remaining cluster a label by contour tracing and records its
// bounding box. The processor reads the labels and boxes of the last finished
// frame through the host port while the next frame is labeled. The display
// path writes one of four pictures (gray video, segmentation mask, morphology
// result, labeled image), with the processor's bounding boxes drawn on top if
// wanted, into a frame memory that a VGA timing generator reads on its own
// pixel clock (vga_output). The filtered mask is also brought out.
//
// Interface: mask_valid/mask_pix/mask_ready on clk_seg, vga_* on clk_pix;
// everything else on clk. Per-stage morphology configuration morph_op/morph_se_w/morph_se_h
// (sampled at the start of each frame by each stage). Labeling results:
// frame_done, n_clusters, label_overflow, host ports, feature stream. Status:
// FIFO overflow flags. Activity pulses (padding steps, contour traces,
// reserved-label writes, cluster entries) for monitoring. Display: clk_pix
// and rst_pix_n, disp_mode and overlay_en, the RGB sensor video stream
// video_* (24-bit {R, G, B}, from the sensor path outside this design, on clk;
// shown as gray), the box table write port
// box_* (from the processor), and the VGA outputs vga_*. The display's four
// sources are the video, the mask as it enters the morphology, the morphology
// result and the labeling unit's read-out of each finished label image.
module surveillance_top
  import surv_pkg::*;
#(
  parameter int unsigned IM_W             = IM_WIDTH,
  parameter int unsigned IM_H             = IM_HEIGHT,
  parameter int unsigned N_MORPH          = 2,
  parameter int unsigned MORPH_FIFO_DEPTH = 2170,
  parameter int unsigned LABEL_FIFO_DEPTH = 51200,
  parameter int unsigned CDC_FIFO_DEPTH   = 16,
  localparam int unsigned SEW = $clog2(SE_MAX + 1),
  localparam int unsigned AW  = $clog2(IM_W * IM_H),
  localparam int unsigned RW  = $clog2(IM_W) + $clog2(IM_H) + $clog2(IM_W + 1) + $clog2(IM_H + 1),
  localparam int unsigned BAW = $clog2(C_MAX)
) (
  // Segmentation clock domain.
  input  logic                clk_seg,
  input  logic                rst_seg_n,
  input  logic                mask_valid,
  input  logic                mask_pix,
  output logic                mask_ready,
  // Processing clock domain.
  input  logic                clk,
  input  logic                rst_n,
  input  morph_op_e           morph_op   [N_MORPH],
  input  logic [SEW-1:0]      morph_se_w [N_MORPH],
  input  logic [SEW-1:0]      morph_se_h [N_MORPH],
  output logic                filt_valid,
  output logic                filt_pix,
  output logic                frame_done,
  output logic [LABEL_W-1:0]  n_clusters,
  output logic                label_overflow,
  input  logic [AW-1:0]       host_label_addr,
  output logic [LABEL_W-1:0]  host_label_data,
  input  logic [LABEL_W-1:0]  host_cluster_addr,
  output logic [RW-1:0]       host_cluster_data,
  output logic                feat_valid,
  output logic [LABEL_W-1:0]  feat_label,
  output logic [RW-1:0]       feat_rec,
  output logic [N_MORPH-1:0]  morph_fifo_overflow,
  output logic                label_fifo_overflow,
  output logic [N_MORPH-1:0]  ev_pad,
  output logic                ev_trace,
  output logic                ev_reserved,
  output logic                ev_enter,
  // Display path
  input  logic                clk_pix,
  input  logic                rst_pix_n,
  input  logic [1:0]          disp_mode,
  input  logic                overlay_en,
  input  logic                video_valid,
  input  logic [23:0]         video_rgb,
  input  logic                box_we,
  input  logic [BAW-1:0]      box_addr,
  input  logic [RW-1:0]       box_wdata,
  input  logic                box_clear,
  output logic [7:0]          vga_r,
  output logic [7:0]          vga_g,
  output logic [7:0]          vga_b,
  output logic                vga_hsync,
  output logic                vga_vsync,
  output logic                vga_de
);
  logic cdc_valid, cdc_pix, cdc_ready;
  logic               disp_label_valid;
  logic [LABEL_W-1:0] disp_label;

  async_fifo #(.WIDTH(1), .DEPTH(CDC_FIFO_DEPTH)) u_cdc (
    .wclk   (clk_seg),
    .wrst_n (rst_seg_n),
    .w_valid(mask_valid),
    .w_data (mask_pix),
    .w_ready(mask_ready),
    .rclk   (clk),
    .rrst_n (rst_n),
    .r_valid(cdc_valid),
    .r_data (cdc_pix),
    .r_ready(cdc_ready)
  );

  morph_chain #(
    .N_STAGES  (N_MORPH),
    .IM_W      (IM_W),
    .IM_H      (IM_H),
    .FIFO_DEPTH(MORPH_FIFO_DEPTH),
    .SEW       (SEW)
  ) u_morph (
    .clk, .rst_n,
    .op           (morph_op),
    .se_w         (morph_se_w),
    .se_h         (morph_se_h),
    .in_valid     (cdc_valid),
    .in_pix       (cdc_pix),
    .in_ready     (cdc_ready),
    .out_valid    (filt_valid),
    .out_pix      (filt_pix),
    .fifo_overflow(morph_fifo_overflow),
    .pad_step     (ev_pad)
  );

  labeling_unit #(
    .IM_W      (IM_W),
    .IM_H      (IM_H),
    .FIFO_DEPTH(LABEL_FIFO_DEPTH)
  ) u_label (
    .clk, .rst_n,
    .in_valid         (filt_valid),
    .in_pix           (filt_pix),
    .fifo_overflow    (label_fifo_overflow),
    .frame_done,
    .n_clusters,
    .label_overflow,
    .host_label_addr,
    .host_label_data,
    .host_cluster_addr,
    .host_cluster_data,
    .feat_valid,
    .feat_label,
    .feat_rec,
    .ev_trace,
    .ev_reserved,
    .ev_enter,
    .disp_valid       (disp_label_valid),
    .disp_label       (disp_label)
  );

  vga_output #(
    .IM_W (IM_W),
    .IM_H (IM_H),
    .N_BOX(C_MAX)
  ) u_vga (
    .clk, .rst_n,
    .mode       (disp_mode),
    .overlay_en,
    .video_valid,
    .video_rgb,
    .seg_valid  (cdc_valid && cdc_ready),
    .seg_pix    (cdc_pix),
    .morph_valid(filt_valid),
    .morph_pix  (filt_pix),
    .label_valid(disp_label_valid),
    .label_pix  (disp_label),
    .box_we,
    .box_addr,
    .box_wdata,
    .box_clear,
    .clk_pix, .rst_pix_n,
    .vga_r, .vga_g, .vga_b,
    .vga_hsync, .vga_vsync, .vga_de
  );

endmodule
