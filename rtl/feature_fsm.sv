// feature_fsm: the feature-extraction state machine of the labeling unit
// (FSM_2).
//
// For each contour the tracer reports every contour pixel (pt_valid with its
// coordinates; pt_first marks the start pixel of a new contour) and finally
// the end of the contour with its label (done). The machine keeps the running
// minimum and maximum coordinates and, at the end of a contour, writes the
// cluster record {x_min, y_min, width, height} into the cluster memory at the
// address given by the label, and presents the same record for one cycle on
// the registered feature output. Since the outer contour holds the extreme
// pixels of a cluster, these are the cluster's bounding box. Width and height
// are stored as counts (x_max - x_min + 1), each field one bit wider than
// needed for a coordinate only when the frame size is a power of two.
module feature_fsm
  import surv_pkg::*;
#(
  parameter int unsigned IM_W = IM_WIDTH,
  parameter int unsigned IM_H = IM_HEIGHT,
  localparam int unsigned XW  = $clog2(IM_W),
  localparam int unsigned YW  = $clog2(IM_H),
  localparam int unsigned WW  = $clog2(IM_W + 1),
  localparam int unsigned HW  = $clog2(IM_H + 1),
  localparam int unsigned RW  = XW + YW + WW + HW
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pt_valid,
  input  logic               pt_first,
  input  logic [XW-1:0]      pt_x,
  input  logic [YW-1:0]      pt_y,
  input  logic               done,
  input  logic [LABEL_W-1:0] done_label,
  output logic               cm_we,
  output logic [LABEL_W-1:0] cm_addr,
  output logic [RW-1:0]      cm_wdata,
  output logic               feat_valid,
  output logic [LABEL_W-1:0] feat_label,
  output logic [RW-1:0]      feat_rec
);
  logic [XW-1:0] xmin, xmax;
  logic [YW-1:0] ymin, ymax;
  logic [WW-1:0] width;
  logic [HW-1:0] height;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xmin <= '0; xmax <= '0; ymin <= '0; ymax <= '0;
    end else if (pt_valid) begin
      if (pt_first) begin
        xmin <= pt_x; xmax <= pt_x; ymin <= pt_y; ymax <= pt_y;
      end else begin
        if (pt_x < xmin) xmin <= pt_x;
        if (pt_x > xmax) xmax <= pt_x;
        if (pt_y < ymin) ymin <= pt_y;
        if (pt_y > ymax) ymax <= pt_y;
      end
    end
  end

  assign width    = WW'(xmax - xmin) + WW'(1);
  assign height   = HW'(ymax - ymin) + HW'(1);
  assign cm_we    = done;
  assign cm_addr  = done_label;
  assign cm_wdata = {xmin, ymin, width, height};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_valid <= 1'b0;
      feat_label <= '0;
      feat_rec   <= '0;
    end else begin
      feat_valid <= done;
      if (done) begin
        feat_label <= done_label;
        feat_rec   <= cm_wdata;
      end
    end
  end

endmodule
