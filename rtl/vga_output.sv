// vga_output: display path of the surveillance system - output mode
// multiplexer, bounding-box overlay, dual-port frame memory and VGA timing.
//
// Write side (processing clock clk): four pixel streams can be shown - the
// sensor video (24-bit {R, G, B}, converted to 8-bit gray as
// (R + 2G + B) / 4), the segmentation mask, the morphology result and
// the labeled image (6-bit labels). Each source has its own raster pixel
// counter, advanced by its valid strobe and wrapping after IM_W x IM_H pixels,
// so every stream keeps its own frame position whatever is selected. The
// source chosen by mode (0 video, 1 segmentation, 2 morphology, 3 labels) is
// written into the frame memory at its counter's address: video as gray, masks
// as 0 / 255, labels as label x 4. When overlay_en is set, pixels on the edge
// of one of the N_BOX boxes in the box table are written as 255 instead. The
// box table holds {x_min, y_min, width, height} records in the same format as
// the labeling unit's cluster memory; the processor writes entries with
// box_we/box_addr/box_wdata (which also marks the entry valid) and empties it
// with box_clear.
//
// Read side (pixel clock clk_pix): counters generate the VGA raster of
// H_VIS x V_VIS visible pixels with front porch, sync pulse and back porch
// (sync pulses active low). Each frame pixel is shown as a 2 x 2 block
// (320 x 240 fills the 640 x 480 raster; a smaller frame sits in the top left
// corner with black around it), the gray value on all three colours.
// Frame memory read and output are registered: vga_r/g/b, vga_hsync,
// vga_vsync and vga_de are aligned and lag the raster counters by two pixel
// clocks. Outside the visible area the colours are 0.
//
// Follows the system description: four output modes (original video as 8-bit
// gray, segmentation, morphology, labeling), boxes from the processor that
// can be shown on any mode, and a dual-port frame memory of 320 x 240 x 8 bits
// written constantly from the system side and read constantly by the VGA
// controller, fed with the sensor's RGB stream. This design's choices: the
// gray conversion formula (a green-weighted average without multipliers),
// the 640 x 480, 60 Hz timing (standard
// VGA numbers, for a 25.175 MHz pixel clock), the 2 x 2 pixel scaling, the
// gray mapping of masks and labels, per-source pixel counters, and drawing the
// boxes into the written pixels from a box table rather than by software.
// The frame memory is the only signal path between the two clocks; its
// content may tear when a frame is written while it is being displayed, as
// with any single-buffered display memory.
module vga_output
  import surv_pkg::*;
#(
  parameter int unsigned IM_W   = IM_WIDTH,
  parameter int unsigned IM_H   = IM_HEIGHT,
  parameter int unsigned N_BOX  = C_MAX,
  parameter int unsigned H_VIS  = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_VIS  = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33,
  localparam int unsigned N     = IM_W * IM_H,
  localparam int unsigned AW    = $clog2(N),
  localparam int unsigned XW    = $clog2(IM_W),
  localparam int unsigned YW    = $clog2(IM_H),
  localparam int unsigned RW    = $clog2(IM_W) + $clog2(IM_H) + $clog2(IM_W + 1) + $clog2(IM_H + 1),
  localparam int unsigned BAW   = (N_BOX > 1) ? $clog2(N_BOX) : 1,
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP
) (
  // System side.
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         mode,
  input  logic               overlay_en,
  input  logic               video_valid,
  input  logic [23:0]        video_rgb,
  input  logic               seg_valid,
  input  logic               seg_pix,
  input  logic               morph_valid,
  input  logic               morph_pix,
  input  logic               label_valid,
  input  logic [LABEL_W-1:0] label_pix,
  input  logic               box_we,
  input  logic [BAW-1:0]     box_addr,
  input  logic [RW-1:0]      box_wdata,
  input  logic               box_clear,
  // Display side.
  input  logic               clk_pix,
  input  logic               rst_pix_n,
  output logic [7:0]         vga_r,
  output logic [7:0]         vga_g,
  output logic [7:0]         vga_b,
  output logic               vga_hsync,
  output logic               vga_vsync,
  output logic               vga_de
);

  localparam int unsigned WW = $clog2(IM_W + 1);
  localparam int unsigned HW = $clog2(IM_H + 1);

  // ---------------------------------------------------------------- write side
  typedef struct packed {
    logic [AW-1:0] addr;
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } pos_t;

  pos_t pos [4];
  logic [3:0] src_valid;
  assign src_valid = {label_valid, morph_valid, seg_valid, video_valid};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) pos[s] <= '0;
    end else begin
      for (int s = 0; s < 4; s++) begin
        if (src_valid[s]) begin
          if (pos[s].addr == AW'(N - 1)) begin
            pos[s] <= '0;
          end else begin
            pos[s].addr <= pos[s].addr + 1'b1;
            if (pos[s].x == XW'(IM_W - 1)) begin
              pos[s].x <= '0;
              pos[s].y <= pos[s].y + 1'b1;
            end else begin
              pos[s].x <= pos[s].x + 1'b1;
            end
          end
        end
      end
    end
  end

  // Box table.
  logic [RW-1:0]    box     [N_BOX];
  logic [N_BOX-1:0] box_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      box_vld <= '0;
    end else if (box_clear) begin
      box_vld <= '0;
    end else if (box_we && int'(box_addr) < N_BOX) begin
      box_vld[box_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (box_we && int'(box_addr) < N_BOX) box[box_addr] <= box_wdata;
  end

  // Gray value of the video pixel: (R + 2G + B) / 4, at most 255.
  logic [9:0] video_sum;
  logic [7:0] video_gray;
  assign video_sum  = 10'(video_rgb[23:16]) + {1'b0, video_rgb[15:8], 1'b0} + 10'(video_rgb[7:0]);
  assign video_gray = video_sum[9:2];

  // Selected source and its pixel value.
  pos_t       wpos;
  logic       wvalid;
  logic [7:0] wval;

  always_comb begin
    wpos   = pos[mode];
    wvalid = src_valid[mode];
    unique case (mode)
      2'd0:    wval = video_gray;
      2'd1:    wval = {8{seg_pix}};
      2'd2:    wval = {8{morph_pix}};
      default: wval = {label_pix, 2'b00};
    endcase
  end

  // Is the written pixel on the edge of a valid box?
  logic on_box;

  always_comb begin
    on_box = 1'b0;
    for (int b = 0; b < N_BOX; b++) begin
      logic [XW-1:0] bx0;
      logic [YW-1:0] by0;
      logic [WW-1:0] bw;
      logic [HW-1:0] bh;
      logic [XW:0]   bx1;
      logic [YW:0]   by1;
      logic          in_x, in_y;
      {bx0, by0, bw, bh} = box[b];
      bx1  = (XW + 1)'(bx0) + (XW + 1)'(bw) - 1'b1;
      by1  = (YW + 1)'(by0) + (YW + 1)'(bh) - 1'b1;
      in_x = (wpos.x >= bx0) && ((XW + 1)'(wpos.x) <= bx1);
      in_y = (wpos.y >= by0) && ((YW + 1)'(wpos.y) <= by1);
      if (box_vld[b] && bw != '0 && bh != '0 &&
          ((in_y && (wpos.x == bx0 || (XW + 1)'(wpos.x) == bx1)) ||
           (in_x && (wpos.y == by0 || (YW + 1)'(wpos.y) == by1))))
        on_box = 1'b1;
    end
  end

  // Frame memory: written on clk, read on clk_pix.
  logic [7:0] fmem [N];

  always_ff @(posedge clk) begin
    if (wvalid) fmem[wpos.addr] <= (overlay_en && on_box) ? 8'hFF : wval;
  end

  // ---------------------------------------------------------------- read side
  logic [$clog2(H_TOT)-1:0] hc;
  logic [$clog2(V_TOT)-1:0] vc;

  always_ff @(posedge clk_pix or negedge rst_pix_n) begin
    if (!rst_pix_n) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == $bits(hc)'(H_TOT - 1)) begin
      hc <= '0;
      vc <= (vc == $bits(vc)'(V_TOT - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  logic          vis, hs, vs;
  logic [XW-1:0] rx;
  logic [YW-1:0] ry;
  logic [AW-1:0] raddr;

  logic in_img;

  assign vis    = (hc < $bits(hc)'(H_VIS)) && (vc < $bits(vc)'(V_VIS));
  assign in_img = (int'(hc) < 2 * IM_W) && (int'(vc) < 2 * IM_H);
  assign hs    = (hc >= $bits(hc)'(H_VIS + H_FP)) && (hc < $bits(hc)'(H_VIS + H_FP + H_SYNC));
  assign vs    = (vc >= $bits(vc)'(V_VIS + V_FP)) && (vc < $bits(vc)'(V_VIS + V_FP + V_SYNC));
  assign rx    = XW'(hc >> 1);
  assign ry    = YW'(vc >> 1);
  assign raddr = in_img ? AW'(AW'(ry) * AW'(IM_W) + AW'(rx)) : '0;

  logic [7:0] rdata;
  logic       vis_d, img_d, hs_d, vs_d;

  always_ff @(posedge clk_pix) begin
    rdata <= fmem[raddr];
  end

  always_ff @(posedge clk_pix or negedge rst_pix_n) begin
    if (!rst_pix_n) begin
      vis_d     <= 1'b0;
      img_d     <= 1'b0;
      hs_d      <= 1'b0;
      vs_d      <= 1'b0;
      vga_r     <= '0;
      vga_g     <= '0;
      vga_b     <= '0;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
      vga_de    <= 1'b0;
    end else begin
      vis_d     <= vis;
      img_d     <= vis && in_img;
      hs_d      <= hs;
      vs_d      <= vs;
      vga_r     <= img_d ? rdata : '0;
      vga_g     <= img_d ? rdata : '0;
      vga_b     <= img_d ? rdata : '0;
      vga_hsync <= !hs_d;
      vga_vsync <= !vs_d;
      vga_de    <= vis_d;
    end
  end

endmodule
