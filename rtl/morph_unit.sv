// morph_unit: one complete erosion/dilation unit, i.e. an input FIFO, the
// padding controller and the datapath.
//
// The pixel stream arrives in raster order, one bit per pixel. The FIFO holds
// it while the datapath spends its extra cycles on east and south padding, so
// the unit can run on a clock only slightly faster than the pixel rate. The
// default depth, 2170 entries, is what the sizing rule
//   FIFO = floor(SE_h/2) * (IM_W + floor(SE_w/2)) * f_in / f_morph
// gives for a 15 x 15 SE, 320-pixel rows, f_in = 7.68 MHz and f_morph = 8.1 MHz.
//
// Interface: in_valid/in_pix/in_ready (in_ready low only when the FIFO is
// full; a pixel offered then is lost and fifo_overflow is set), op and the SE
// size (sampled at the first pixel of each frame), out_valid/out_pix (no
// back-pressure: one output pixel per image pixel, two cycles after the step
// that produced it). pad_step marks each cycle spent on an east or south
// padding position.
module morph_unit
  import surv_pkg::*;
#(
  parameter int unsigned IM_W       = IM_WIDTH,
  parameter int unsigned IM_H       = IM_HEIGHT,
  parameter int unsigned FIFO_DEPTH = 2170,
  parameter int unsigned SEW        = $clog2(SE_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  morph_op_e      op,
  input  logic [SEW-1:0] se_w,
  input  logic [SEW-1:0] se_h,
  input  logic           in_valid,
  input  logic           in_pix,
  output logic           in_ready,
  output logic           out_valid,
  output logic           out_pix,
  output logic           fifo_overflow,
  output logic           pad_step,
  output logic           frame_end
);
  logic                    f_valid, f_data, f_take;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  logic                    step, w_bnd, n_bnd, es_bnd, s1_keep, row_out;
  logic [$clog2(IM_W)-1:0] col;
  logic [SEW-1:0]          cur_w, cur_h;
  morph_op_e               op_l;
  logic                    fend;

  sync_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (in_pix),
    .in_ready (in_ready),
    .out_valid(f_valid),
    .out_data (f_data),
    .out_ready(f_take),
    .count    (f_count),
    .overflow (fifo_overflow)
  );

  morph_ctrl #(.IM_W(IM_W), .IM_H(IM_H), .SEW(SEW)) u_ctrl (
    .clk, .rst_n,
    .se_w, .se_h,
    .in_valid (f_valid),
    .in_take  (f_take),
    .step, .w_bnd, .n_bnd, .es_bnd, .s1_keep, .col, .row_out,
    .frame_end(fend),
    .cur_w, .cur_h
  );

  // The operation is held for a frame like the SE size.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       op_l <= OP_ERODE;
    else if (step && w_bnd && n_bnd)  op_l <= op;
  end

  morph_datapath #(.IM_W(IM_W), .SEW(SEW)) u_dp (
    .clk, .rst_n,
    .op       ((w_bnd && n_bnd) ? op : op_l),
    .se_w     (cur_w),
    .se_h     (cur_h),
    .step,
    .pix      (f_data),
    .w_bnd, .n_bnd, .es_bnd, .s1_keep, .col, .row_out,
    .out_valid,
    .out_pix
  );

  assign pad_step  = step && es_bnd;
  assign frame_end = step && fend;

endmodule
