// morph_ctrl: padding controller of one erosion/dilation unit.
//
// The datapath walks a padded frame of (IM_WIDTH + east) columns by
// (IM_HEIGHT + south) rows, one position per step, where east = floor(SE_w/2)
// and south = floor(SE_h/2). West and north padding never cost a cycle: their
// effect is preloaded into the running sums (the W- and N-boundary signals).
// East and south padding positions consume no input pixel; the datapath is fed
// a constant one there (the E/S-boundary signal) and the input FIFO is stalled.
// Positions inside the image take one pixel from the FIFO and wait while it is
// empty. A frame therefore takes IM_WIDTH*IM_HEIGHT + t_pad steps with
// t_pad = east*IM_HEIGHT + south*(IM_WIDTH + east).
//
// The structuring element size is sampled when the first position of a frame
// is stepped and then held for the whole frame, so it can be changed at run
// time between frames. A size of 0 is treated as 1. Odd sizes centre the SE on
// the output pixel; even sizes are accepted and put the extra row or column
// above or to the left.
//
// Outputs per step: w_bnd (first stream column), n_bnd (first stream row),
// es_bnd (east or south padding position), s1_keep (stage-1 result belongs to
// an image column), col (that column), row_out (stage-2 result belongs to an
// image row), frame_end (last position of the padded frame).
module morph_ctrl
  import surv_pkg::*;
#(
  parameter int unsigned IM_W = IM_WIDTH,
  parameter int unsigned IM_H = IM_HEIGHT,
  parameter int unsigned SEW  = $clog2(SE_MAX + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [SEW-1:0]            se_w,
  input  logic [SEW-1:0]            se_h,
  input  logic                      in_valid,
  output logic                      in_take,
  output logic                      step,
  output logic                      w_bnd,
  output logic                      n_bnd,
  output logic                      es_bnd,
  output logic                      s1_keep,
  output logic [$clog2(IM_W)-1:0]   col,
  output logic                      row_out,
  output logic                      frame_end,
  output logic [SEW-1:0]            cur_w,
  output logic [SEW-1:0]            cur_h
);
  localparam int unsigned XW = $clog2(IM_W + SE_MAX);
  localparam int unsigned YW = $clog2(IM_H + SE_MAX);

  logic [XW-1:0]  x;
  logic [YW-1:0]  y;
  logic [SEW-1:0] w_l, h_l;
  logic           at_origin, need_in, last_x, last_y;
  logic [SEW-1:0] east, south;

  assign at_origin = (x == '0) && (y == '0);
  assign cur_w     = at_origin ? ((se_w == '0) ? SEW'(1) : se_w) : w_l;
  assign cur_h     = at_origin ? ((se_h == '0) ? SEW'(1) : se_h) : h_l;
  assign east      = cur_w >> 1;
  assign south     = cur_h >> 1;

  assign need_in = (x < XW'(IM_W)) && (y < YW'(IM_H));
  assign step    = need_in ? in_valid : 1'b1;
  assign in_take = need_in && in_valid;

  assign last_x    = (x == XW'(IM_W - 1) + XW'(east));
  assign last_y    = (y == YW'(IM_H - 1) + YW'(south));
  assign frame_end = last_x && last_y;

  assign w_bnd   = (x == '0);
  assign n_bnd   = (y == '0);
  assign es_bnd  = !need_in;
  assign s1_keep = (x >= XW'(east));
  assign col     = $clog2(IM_W)'(x - XW'(east));
  assign row_out = (y >= YW'(south));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x   <= '0;
      y   <= '0;
      w_l <= SEW'(1);
      h_l <= SEW'(1);
    end else if (step) begin
      if (at_origin) begin
        w_l <= cur_w;
        h_l <= cur_h;
      end
      if (last_x) begin
        x <= '0;
        y <= last_y ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

endmodule
