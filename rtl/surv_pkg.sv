// surv_pkg: constants and types shared by the morphology and labeling
// accelerators of the surveillance pipeline.
//
// The frame size (320 x 240), the largest structuring element (15 x 15), the
// label word of 6 bits and the three reserved label values (0 = background or
// hole, 1 = unlabeled cluster pixel, 2 = reserved border label) follow the
// thesis-level specification of the system. The cluster record layout
// (x_min, y_min, width, height) is the one the cluster memory stores.
package surv_pkg;

  // Default frame geometry of the prototype.
  localparam int unsigned IM_WIDTH  = 320;
  localparam int unsigned IM_HEIGHT = 240;

  // Largest supported rectangular structuring element.
  localparam int unsigned SE_MAX = 15;

  // Labeling: 61 traceable clusters plus the three preoccupied values.
  localparam int unsigned C_MAX   = 61;
  localparam int unsigned LABEL_W = 6;

  localparam logic [LABEL_W-1:0] LBL_BG       = 6'd0;  // background or hole
  localparam logic [LABEL_W-1:0] LBL_UNLABELED = 6'd1; // cluster pixel, not yet labeled
  localparam logic [LABEL_W-1:0] LBL_RESERVED = 6'd2;  // written beside a contour
  localparam logic [LABEL_W-1:0] LBL_FIRST    = 6'd3;  // first cluster label

  // Morphological operation of one erosion/dilation unit.
  typedef enum logic {
    OP_ERODE  = 1'b0,
    OP_DILATE = 1'b1
  } morph_op_e;

endpackage
