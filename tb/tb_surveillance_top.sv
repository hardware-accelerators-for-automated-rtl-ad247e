// tb_surveillance_top: end-to-end testbench of the accelerator chain at a
// reduced frame size (40 x 30).
//
// The motion mask is produced on the segmentation clock (period 10) at one
// pixel every eighth cycle and crosses into the processing clock (period 15).
// Each frame draws random shapes (boxes, rings with holes, U shapes, ellipses,
// ragged blobs) plus isolated noise pixels, and uses its own morphology
// configuration: openings of several SE sizes, a closing, an identity (1 x 1)
// pass, and a frame with more clusters than labels. In every fifth frame the
// first four rows arrive as a burst at the full segmentation clock rate,
// faster than the processing clock, so pixels queue in the FIFOs while the
// padding steps run (a longer burst would exceed the labeling unit's budget of
// three cycles per pixel on average and overflow its FIFO).
//
// Checks, all against models in the testbench: every filtered pixel (the
// reference morphology applied stage by stage), the number of clusters, the
// label overflow flag, every feature record and every bounding box read back
// from the cluster memory through the host port during the next frame, and the
// label at the first pixel of every cluster. Mechanisms counted, each of which
// must occur: padding steps with input waiting in the FIFO, SE size changes,
// switches between opening and closing, contour traces, reserved-label writes,
// cluster entries of the scan, filled holes, label overflow, and result bank
// swaps read by the host. No FIFO may overflow. Before the last frame one
// displayed VGA frame (morphology mode) must show the previous filtered frame;
// after it, in label mode, one displayed frame must show the last label image
// (label x 4, as read through the host port). Each pixel is a 2 x 2 block in
// the top left corner, and the rest is black.
module tb_surveillance_top;
  import surv_pkg::*;
  import morph_ref_pkg::*;
  import label_ref_pkg::*;

  localparam int IM_W = 40;
  localparam int IM_H = 30;
  localparam int N    = IM_W * IM_H;
  localparam int NM   = 2;
  localparam int SEW  = 4;
  localparam int AW   = $clog2(N);
  localparam int RW   = $clog2(IM_W) + $clog2(IM_H) + $clog2(IM_W + 1) + $clog2(IM_H + 1);
  localparam int FRAMES = 14;

  class frame_exp;
    bit    filt[];
    int    comp[];
    comp_t comps[$];
  endclass

  logic clk_seg = 1'b0, clk = 1'b0;
  logic rst_seg_n = 1'b0, rst_n = 1'b0;
  always #5 clk_seg = ~clk_seg;
  always #7.5 clk = ~clk;

  logic               mask_valid, mask_pix, mask_ready;
  morph_op_e          morph_op   [NM];
  logic [SEW-1:0]     morph_se_w [NM];
  logic [SEW-1:0]     morph_se_h [NM];
  logic               filt_valid, filt_pix, frame_done, label_overflow;
  logic [LABEL_W-1:0] n_clusters, host_cluster_addr, feat_label, host_label_data;
  logic [AW-1:0]      host_label_addr;
  logic [RW-1:0]      host_cluster_data, feat_rec;
  logic               feat_valid, label_fifo_overflow, ev_trace, ev_reserved, ev_enter;
  logic [NM-1:0]      morph_fifo_overflow, ev_pad;
  // Display path: morphology mode, then label mode for the last frame; no
  // overlay, video idle.
  logic               clk_pix = 1'b0, rst_pix_n = 1'b0;
  logic [1:0]         disp_mode = 2'd2;
  logic               overlay_en = 1'b0, video_valid = 1'b0;
  logic [23:0]        video_rgb = '0;
  logic               box_we = 1'b0, box_clear = 1'b0;
  logic [$clog2(C_MAX)-1:0] box_addr = '0;
  logic [RW-1:0]      box_wdata = '0;
  logic [7:0]         vga_r, vga_g, vga_b;
  logic               vga_hsync, vga_vsync, vga_de;
  always #20 clk_pix = ~clk_pix;
  bit                 last_filt[];
  logic [7:0]         disp_exp[N];

  // Check one complete displayed frame against disp_exp: every frame pixel
  // as a 2 x 2 block in the top left corner, black elsewhere.
  task automatic check_display(input string what);
    int p, x, y;
    @(posedge clk_pix iff !vga_vsync);
    @(posedge clk_pix iff vga_vsync);
    p = 0;
    while (p < 640 * 480) begin
      @(posedge clk_pix);
      if (vga_de) begin
        x = p % 640;
        y = p / 640;
        if (x < 2 * IM_W && y < 2 * IM_H)
          check(vga_r == disp_exp[(y / 2) * IM_W + x / 2], $sformatf("%s: display pixel (%0d,%0d)", what, x, y));
        else
          check(vga_r == 8'h00, $sformatf("%s: display border (%0d,%0d)", what, x, y));
        n_disp_checked++;
        p++;
      end
    end
  endtask
  int                 n_disp_checked = 0;

  surveillance_top #(
    .IM_W(IM_W), .IM_H(IM_H), .N_MORPH(NM),
    .MORPH_FIFO_DEPTH(300), .LABEL_FIFO_DEPTH(N * 2 / 3), .CDC_FIFO_DEPTH(16)
  ) dut (.*);

  int checks = 0, failures = 0;
  frame_exp filt_q[$], lab_q[$];
  int frames_done = 0, filt_idx = 0, feat_idx = 0;
  int n_pad_buffered = 0, n_traces = 0, n_reserved = 0, n_enter = 0;
  int n_se_change = 0, n_mode_switch = 0, n_holes = 0, n_lbl_ovf = 0, n_swaps = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [RW-1:0] rec_of(comp_t cc);
    return {$clog2(IM_W)'(cc.xmin), $clog2(IM_H)'(cc.ymin),
            $clog2(IM_W + 1)'(cc.xmax - cc.xmin + 1), $clog2(IM_H + 1)'(cc.ymax - cc.ymin + 1)};
  endfunction

  // Filtered stream and activity.
  always @(posedge clk) begin
    if (rst_n) begin
      if (filt_valid) begin
        if (filt_q.size() > 0) begin
          check(filt_pix == filt_q[0].filt[filt_idx], $sformatf("filtered pixel %0d of frame %0d", filt_idx, frames_done));
          filt_idx++;
          if (filt_idx == N) begin
            last_filt = filt_q[0].filt;
            lab_q.push_back(filt_q.pop_front());
            filt_idx = 0;
          end
        end else check(1'b0, "filtered pixel without a frame");
      end
      if (ev_pad[0] && dut.u_morph.g_stage[0].u_unit.u_fifo.count != 0) n_pad_buffered++;
      if (ev_trace)    n_traces++;
      if (ev_reserved) n_reserved++;
      if (ev_enter)    n_enter++;
      if (feat_valid) begin
        if (lab_q.size() > 0)
          check(feat_idx < lab_q[0].comps.size() && feat_label == LABEL_W'(3 + feat_idx) &&
                feat_rec == rec_of(lab_q[0].comps[feat_idx]), $sformatf("feature record %0d", feat_idx));
        else check(1'b0, "feature record without a frame");
        feat_idx++;
      end
    end
  end

  // Labeling results, read through the host port after each bank swap.
  initial begin
    host_label_addr = '0;
    host_cluster_addr = '0;
    forever begin
      frame_exp fe;
      int nexp;
      @(posedge clk iff (rst_n && frame_done));
      fe = lab_q.pop_front();
      nexp = (fe.comps.size() > C_MAX) ? C_MAX : fe.comps.size();
      if (fe.comps.size() > C_MAX) n_lbl_ovf++;
      check(int'(n_clusters) == nexp, $sformatf("frame %0d: %0d clusters, expected %0d", frames_done, n_clusters, nexp));
      check(label_overflow == (fe.comps.size() > C_MAX), $sformatf("frame %0d: overflow flag", frames_done));
      check(feat_idx == nexp, $sformatf("frame %0d: %0d feature records", frames_done, feat_idx));
      feat_idx = 0;
      for (int l = 0; l < nexp; l++) begin
        @(negedge clk) host_cluster_addr = LABEL_W'(3 + l);
        @(posedge clk); #1;
        check(host_cluster_data == rec_of(fe.comps[l]), $sformatf("frame %0d: cluster memory %0d", frames_done, l));
        @(negedge clk) host_label_addr = AW'(fe.comps[l].first);
        @(posedge clk); #1;
        check(int'(host_label_data) == 3 + l, $sformatf("frame %0d: first pixel of cluster %0d", frames_done, l));
      end
      check(morph_fifo_overflow == '0 && !label_fifo_overflow, $sformatf("frame %0d: FIFO overflow", frames_done));
      n_swaps++;
      frames_done++;
    end
  end

  initial begin : watchdog
    repeat (FRAMES * 10 * N + 4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d frames", frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pw[NM], ph[NM];
    bit pd[NM];
    mask_valid = 0; mask_pix = 0;
    foreach (morph_op[s]) begin morph_op[s] = OP_ERODE; morph_se_w[s] = 1; morph_se_h[s] = 1; pw[s] = 1; ph[s] = 1; pd[s] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1; rst_seg_n = 1; rst_pix_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      frame_exp fe;
      bit img[], mid[];
      int w[NM], h[NM];
      bit d[NM];
      fe = new();
      img = new[N];
      // Morphology configuration of this frame.
      case (f % 5)
        0: begin d[0] = 0; d[1] = 1; w = '{3, 3}; h = '{3, 3}; end      // opening 3x3
        1: begin d[0] = 0; d[1] = 1; w = '{5, 5}; h = '{3, 5}; end      // opening, larger SE
        2: begin d[0] = 1; d[1] = 0; w = '{3, 3}; h = '{5, 5}; end      // closing
        3: begin d[0] = 0; d[1] = 1; w = '{1, 1}; h = '{1, 1}; end      // identity
        default: begin d[0] = 0; d[1] = 1; w = '{3, 3}; h = '{3, 3}; end
      endcase
      if (f == 6) begin d[0] = 0; d[1] = 1; w = '{1, 1}; h = '{1, 1}; end
      for (int s = 0; s < NM; s++) begin
        if (w[s] != pw[s] || h[s] != ph[s]) n_se_change++;
        pw[s] = w[s]; ph[s] = h[s];
      end
      if (d[0] != pd[0]) n_mode_switch++;
      pd = d;
      // Frame contents.
      if (f == 6) begin
        for (int k = 0; k < 70; k++) draw_shape(img, IM_W, 4 * (k % 10), 4 * (k / 10), 3, 3, 0);
      end else begin
        for (int k = 0; k < 6; k++) begin
          int sw, sh;
          sw = $urandom_range(14, 6); sh = $urandom_range(14, 6);
          draw_shape(img, IM_W, $urandom_range(IM_W - sw), $urandom_range(IM_H - sh), sw, sh, $urandom_range(6));
        end
        for (int k = 0; k < 25; k++) img[$urandom_range(N - 1)] = 1;
      end
      ref_image(img, IM_W, IM_H, w[0], h[0], d[0], mid);
      ref_image(mid, IM_W, IM_H, w[1], h[1], d[1], fe.filt);
      ref_label(fe.filt, IM_W, IM_H, fe.comp, fe.comps);
      foreach (fe.comp[i]) if (fe.comp[i] >= 0 && !fe.filt[i]) begin n_holes++; break; end
      // Wait until the previous frame has left the morphology cascade
      // before changing its configuration.
      wait (filt_q.size() == 0);
      // Before the last frame: the display (morphology mode) must show the
      // previous filtered frame; then switch it to the labeled image.
      if (f == FRAMES - 1) begin
        foreach (disp_exp[i]) disp_exp[i] = last_filt[i] ? 8'hFF : 8'h00;
        check_display("morphology mode");
        disp_mode = 2'd3;
      end
      @(negedge clk);
      for (int s = 0; s < NM; s++) begin
        morph_op[s] = d[s] ? OP_DILATE : OP_ERODE; morph_se_w[s] = SEW'(w[s]); morph_se_h[s] = SEW'(h[s]);
      end
      filt_q.push_back(fe);
      for (int i = 0; i < N; i++) begin
        @(negedge clk_seg);
        mask_valid = 1; mask_pix = img[i];
        do @(posedge clk_seg); while (!mask_ready);
        @(negedge clk_seg);
        mask_valid = 0;
        if (f % 5 != 4 || i >= 4 * IM_W) repeat (6) @(negedge clk_seg);
      end
    end
    wait (frames_done == FRAMES);
    repeat (5) @(posedge clk);
    check(morph_fifo_overflow == '0 && !label_fifo_overflow, "FIFO overflow");
    // The display shows the last labeled frame (label x 4), each pixel as a
    // 2 x 2 block. The host port is free again once frames_done has advanced.
    for (int i = 0; i < N; i++) begin
      @(negedge clk) host_label_addr = AW'(i);
      @(posedge clk); #1;
      disp_exp[i] = {host_label_data, 2'b00};
    end
    check_display("label mode");
    $display("display pixels checked %0d", n_disp_checked);
    check(n_disp_checked == 2 * 640 * 480, "display frames");
    $display("padding steps with input waiting %0d, SE changes %0d, opening/closing switches %0d",
             n_pad_buffered, n_se_change, n_mode_switch);
    $display("contour traces %0d, reserved writes %0d, cluster entries %0d, frames with holes %0d, label overflow frames %0d, bank swaps %0d",
             n_traces, n_reserved, n_enter, n_holes, n_lbl_ovf, n_swaps);
    check(n_pad_buffered > 0, "no padding step with buffered input");
    check(n_se_change > 0,    "no SE size change");
    check(n_mode_switch > 0,  "no opening/closing switch");
    check(n_traces > 0,       "no contour trace");
    check(n_reserved > 0,     "no reserved-label write");
    check(n_enter > 0,        "no cluster entry");
    check(n_holes > 0,        "no filled hole");
    check(n_lbl_ovf > 0,      "no label overflow");
    check(n_swaps == FRAMES,  "bank swaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
