// labeling_unit: connected-cluster labeling by contour tracing, with feature
// extraction and double-buffered results.
//
// Each binary frame is written into a label memory and labeled there by the
// contour tracer (FSM_1): every 8-connected cluster gets its own label on its
// outer contour, reserved labels are written just outside the contour, holes
// are treated as part of the cluster, and up to C_MAX = 61 clusters are
// labeled per frame. For every traced contour the feature machine (FSM_2)
// stores the bounding box {x_min, y_min, width, height} in a cluster memory
// addressed by the label, and the same record leaves the unit on the
// registered feature output.
//
// Label and cluster memories are both doubled. While a frame is labeled in
// one pair, the other pair holds the previous frame's result for a whole frame
// time and can be read at random through the host port (processor access). The
// pairs swap when a frame is finished (frame_done).
//
// The input FIFO absorbs the pixel stream while the unit is scanning and
// tracing and not taking pixels. With the worst case of three memory accesses
// per pixel the unit needs a clock of three times the pixel rate; at that
// clock the scan phase, at most 2 x IM_W x IM_H cycles, lets 2/3 of a frame
// arrive, which sets the default FIFO depth of 51,200 bits. That depth is this
// design's estimate; the overflow flag reports a frame that did not fit.
//
// Interface: in_valid/in_pix raster-order pixel stream (no back-pressure);
// frame_done pulses once per frame, with n_clusters (labels used) and
// label_overflow (a cluster was left unlabeled because all labels were taken) valid from then
// until the next frame_done; host_label_addr -> host_label_data and
// host_cluster_addr -> host_cluster_data, one cycle read latency, from the
// finished frame; feat_valid/feat_label/feat_rec one record per traced
// cluster. ev_trace, ev_reserved, ev_enter are activity pulses for monitoring.
//
// Display stream: after each frame_done the finished label image is read out
// once in raster order through a second read port of the label memory,
// starting two cycles after frame_done, one label per cycle (disp_valid,
// disp_label), for the display multiplexer. It ends well before the next bank
// swap, since writing the next frame alone takes IM_W x IM_H cycles.
module labeling_unit
  import surv_pkg::*;
#(
  parameter int unsigned IM_W       = IM_WIDTH,
  parameter int unsigned IM_H       = IM_HEIGHT,
  parameter int unsigned FIFO_DEPTH = 51200,
  localparam int unsigned XW  = $clog2(IM_W),
  localparam int unsigned YW  = $clog2(IM_H),
  localparam int unsigned AW  = $clog2(IM_W * IM_H),
  localparam int unsigned RW  = XW + YW + $clog2(IM_W + 1) + $clog2(IM_H + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_pix,
  output logic               fifo_overflow,
  output logic               frame_done,
  output logic [LABEL_W-1:0] n_clusters,
  output logic               label_overflow,
  input  logic [AW-1:0]      host_label_addr,
  output logic [LABEL_W-1:0] host_label_data,
  input  logic [LABEL_W-1:0] host_cluster_addr,
  output logic [RW-1:0]      host_cluster_data,
  output logic               feat_valid,
  output logic [LABEL_W-1:0] feat_label,
  output logic [RW-1:0]      feat_rec,
  output logic               ev_trace,
  output logic               ev_reserved,
  output logic               ev_enter,
  output logic               disp_valid,
  output logic [LABEL_W-1:0] disp_label
);
  logic                f_valid, f_data, f_ready, f_in_ready;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  logic                bank, swap;

  logic [AW-1:0]       lm_addr;
  logic                lm_we;
  logic [LABEL_W-1:0]  lm_wdata, lm_rdata;

  logic                pt_valid, pt_first, trace_done;
  logic [XW-1:0]       pt_x;
  logic [YW-1:0]       pt_y;
  logic [LABEL_W-1:0]  trace_label;

  logic                cm_we;
  logic [LABEL_W-1:0]  cm_addr;
  logic [RW-1:0]       cm_wdata, cm_rdata_unused, cm_crdata_unused;

  logic                d_active;
  logic [AW-1:0]       d_addr;

  sync_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (in_pix),
    .in_ready (f_in_ready),
    .out_valid(f_valid),
    .out_data (f_data),
    .out_ready(f_ready),
    .count    (f_count),
    .overflow (fifo_overflow)
  );

  contour_tracer #(.IM_W(IM_W), .IM_H(IM_H)) u_fsm1 (
    .clk, .rst_n,
    .in_valid   (f_valid),
    .in_pix     (f_data),
    .in_ready   (f_ready),
    .mem_addr   (lm_addr),
    .mem_we     (lm_we),
    .mem_wdata  (lm_wdata),
    .mem_rdata  (lm_rdata),
    .pt_valid, .pt_first, .pt_x, .pt_y,
    .trace_done, .trace_label,
    .swap,
    .frame_done,
    .n_clusters,
    .label_overflow,
    .ev_reserved,
    .ev_enter
  );

  feature_fsm #(.IM_W(IM_W), .IM_H(IM_H)) u_fsm2 (
    .clk, .rst_n,
    .pt_valid, .pt_first, .pt_x, .pt_y,
    .done       (trace_done),
    .done_label (trace_label),
    .cm_we, .cm_addr, .cm_wdata,
    .feat_valid, .feat_label, .feat_rec
  );

  pingpong_ram #(.WIDTH(LABEL_W), .DEPTH(IM_W * IM_H)) u_label_mem (
    .clk,
    .sel     (bank),
    .a_addr  (lm_addr),
    .a_we    (lm_we),
    .a_wdata (lm_wdata),
    .a_rdata (lm_rdata),
    .b_addr  (host_label_addr),
    .b_rdata (host_label_data),
    .c_addr  (d_addr),
    .c_rdata (disp_label)
  );

  pingpong_ram #(.WIDTH(RW), .DEPTH(2 ** LABEL_W)) u_cluster_mem (
    .clk,
    .sel     (bank),
    .a_addr  (cm_addr),
    .a_we    (cm_we),
    .a_wdata (cm_wdata),
    .a_rdata (cm_rdata_unused),
    .b_addr  (host_cluster_addr),
    .b_rdata (host_cluster_data),
    .c_addr  ('0),
    .c_rdata (cm_crdata_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          bank <= 1'b0;
    else if (swap)       bank <= ~bank;
  end

  assign ev_trace = trace_done;

  // Display read-out of the finished label image.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_active   <= 1'b0;
      d_addr     <= '0;
      disp_valid <= 1'b0;
    end else begin
      disp_valid <= d_active;
      if (frame_done) begin
        d_active <= 1'b1;
        d_addr   <= '0;
      end else if (d_active) begin
        if (d_addr == AW'(IM_W * IM_H - 1)) d_active <= 1'b0;
        else                                d_addr   <= d_addr + 1'b1;
      end
    end
  end

endmodule
