// tb_labeling_unit: self-checking testbench of the contour tracing labeling
// unit (contour tracer, feature machine, double label and cluster memories,
// input FIFO).
//
// Frames are streamed back to back at one pixel every third clock cycle,
// i.e. with the unit clocked at three times the pixel rate, and the input FIFO
// is set to 2/3 of a frame. Frame contents: grids of shapes (boxes, rings with
// holes, U shapes open upwards and downwards, diagonal crosses, ellipses, ragged
// blobs, combs), random masks of several densities, an empty frame and a frame
// with more isolated pixels than there are labels.
//
// For every finished frame the testbench checks, against the reference model
// of label_ref_pkg: the number of clusters and the label overflow flag, each
// feature record on the output stream, each bounding box in the cluster memory
// read through the host port, and the whole label memory read through the host
// port (the first pixel of every cluster carries its label, every labeled pixel
// belongs to that cluster, reserved labels sit on background only). The host
// reads happen while the next frame is being labeled, which exercises the
// double buffering. The display read-out of every finished frame must equal
// the label memory read through the host port. It also checks that no frame overflowed the FIFO and that
// the unit's own processing time per frame stays within 3 x IM_W x IM_H cycles
// for the shape frames. Random masks of high density have many more contour
// pixels than a segmented scene and may need longer; they are sent with a
// pause after them and are not held to that bound.
module tb_labeling_unit;
  import surv_pkg::*;
  import label_ref_pkg::*;

  localparam int IM_W = 48;
  localparam int IM_H = 36;
  localparam int N    = IM_W * IM_H;
  localparam int AW   = $clog2(N);
  localparam int XW   = $clog2(IM_W);
  localparam int YW   = $clog2(IM_H);
  localparam int WW   = $clog2(IM_W + 1);
  localparam int HW   = $clog2(IM_H + 1);
  localparam int RW   = XW + YW + WW + HW;
  localparam int FRAMES = 40;

  class frame_exp;
    bit    img[];
    int    comp[];
    comp_t comps[$];
    bit    noise;     // random mask: no processing-time bound applies
  endclass

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid, in_pix, fifo_overflow, frame_done, label_overflow;
  logic [LABEL_W-1:0] n_clusters, host_cluster_addr, feat_label;
  logic [AW-1:0]      host_label_addr;
  logic [LABEL_W-1:0] host_label_data;
  logic [RW-1:0]      host_cluster_data, feat_rec;
  logic               feat_valid, ev_trace, ev_reserved, ev_enter;

  labeling_unit #(.IM_W(IM_W), .IM_H(IM_H), .FIFO_DEPTH(N * 2 / 3)) dut (
    .clk, .rst_n, .in_valid, .in_pix, .fifo_overflow, .frame_done, .n_clusters,
    .label_overflow, .host_label_addr, .host_label_data, .host_cluster_addr,
    .host_cluster_data, .feat_valid, .feat_label, .feat_rec, .ev_trace,
    .ev_reserved, .ev_enter, .disp_valid, .disp_label
  );

  // Display read-out: collected per frame, compared with the host reads.
  logic               disp_valid;
  logic [LABEL_W-1:0] disp_label;
  logic [LABEL_W-1:0] disp_buf[N], host_buf[N];
  int                 disp_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (frame_done) disp_cnt = 0;
    else if (disp_valid) begin
      if (disp_cnt < N) disp_buf[disp_cnt] = disp_label;
      disp_cnt++;
    end
  end

  int checks = 0, failures = 0;
  frame_exp sent_q[$];     // frames sent, not yet finished
  int frames_done = 0;
  int n_traces = 0, n_reserved = 0, n_enter = 0, n_overflow_frames = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [RW-1:0] rec_of(comp_t cc);
    return {XW'(cc.xmin), YW'(cc.ymin), WW'(cc.xmax - cc.xmin + 1), HW'(cc.ymax - cc.ymin + 1)};
  endfunction

  // Activity and processing-time monitor. Busy = cycles that are not spent
  // waiting for input pixels in the write phase.
  longint busy = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_trace)    n_traces++;
      if (ev_reserved) n_reserved++;
      if (ev_enter)    n_enter++;
      if (!(dut.f_ready && !dut.f_valid) && !(dut.f_ready && dut.u_fsm1.waddr == '0 && !dut.f_valid))
        busy++;
    end
  end

  // Feature stream of the frame being labeled.
  int feat_idx = 0;
  always @(posedge clk) begin
    if (rst_n && feat_valid) begin
      if (sent_q.size() > 0) begin
        frame_exp fe;
        fe = sent_q[0];
        check(feat_idx < fe.comps.size() && feat_label == LABEL_W'(3 + feat_idx) &&
              feat_rec == rec_of(fe.comps[feat_idx]),
              $sformatf("frame %0d feature record %0d", frames_done, feat_idx));
      end
      feat_idx++;
    end
  end

  // Result checker: runs at every frame_done, reads the finished bank.
  initial begin
    host_label_addr = '0;
    host_cluster_addr = '0;
    forever begin
      frame_exp fe;
      int nexp;
      bit ovf_exp;
      @(posedge clk iff (rst_n && frame_done));
      fe = sent_q.pop_front();
      nexp = (fe.comps.size() > C_MAX) ? C_MAX : fe.comps.size();
      ovf_exp = fe.comps.size() > C_MAX;
      if (ovf_exp) n_overflow_frames++;
      check(int'(n_clusters) == nexp, $sformatf("frame %0d: %0d clusters, expected %0d", frames_done, n_clusters, nexp));
      check(label_overflow == ovf_exp, $sformatf("frame %0d: overflow flag", frames_done));
      check(feat_idx == nexp, $sformatf("frame %0d: %0d feature records", frames_done, feat_idx));
      if (!fe.noise)
        check(busy <= 3 * N, $sformatf("frame %0d: %0d busy cycles > 3*N", frames_done, busy));
      busy = 0;
      feat_idx = 0;
      // Cluster memory.
      for (int l = 0; l < nexp; l++) begin
        @(negedge clk) host_cluster_addr = LABEL_W'(3 + l);
        @(posedge clk); #1;
        check(host_cluster_data == rec_of(fe.comps[l]), $sformatf("frame %0d: cluster memory label %0d", frames_done, 3 + l));
      end
      // Label memory.
      for (int i = 0; i < N; i++) begin
        int v;
        @(negedge clk) host_label_addr = AW'(i);
        @(posedge clk); #1;
        v = host_label_data;
        host_buf[i] = host_label_data;
        if (v >= 3) begin
          check(v - 3 < nexp && fe.comp[i] == v - 3, $sformatf("frame %0d: pixel %0d has label %0d, cluster %0d", frames_done, i, v, fe.comp[i]));
        end else if (v == 1) begin
          check(fe.img[i] == 1, $sformatf("frame %0d: pixel %0d holds 1 but is background", frames_done, i));
        end else begin
          check(fe.img[i] == 0, $sformatf("frame %0d: pixel %0d cleared", frames_done, i));
        end
      end
      // The display stream of this frame (N labels from two cycles after
      // frame_done) is complete after a few more cycles.
      repeat (3) @(posedge clk);
      check(disp_cnt == N, $sformatf("frame %0d: %0d display pixels", frames_done, disp_cnt));
      for (int i = 0; i < N; i++)
        if (disp_buf[i] != host_buf[i]) begin
          check(1'b0, $sformatf("frame %0d: display pixel %0d", frames_done, i));
          break;
        end
      checks++;
      for (int l = 0; l < nexp; l++) begin
        @(negedge clk) host_label_addr = AW'(fe.comps[l].first);
        @(posedge clk); #1;
        check(int'(host_label_data) == 3 + l, $sformatf("frame %0d: first pixel of cluster %0d", frames_done, l));
      end
      frames_done++;
    end
  end

  initial begin : watchdog
    repeat (FRAMES * 8 * N) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d frames", frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_pix = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      frame_exp fe;
      fe = new();
      fe.img = new[N];
      if (f == 3) begin
        // empty frame
      end else if (f == 5) begin
        // more isolated pixels than labels
        for (int k = 0; k < 75; k++) fe.img[(2 * (k / 22) + 1) * IM_W + 2 * (k % 22) + 1] = 1;
      end else if (f % 3 == 0 || f % 3 == 1) begin
        for (int cy = 0; cy + 12 <= IM_H; cy += 12)
          for (int cx = 0; cx + 12 <= IM_W; cx += 12) begin
            int w, h, x0, y0;
            w = $urandom_range(11, 1); h = $urandom_range(11, 1);
            x0 = cx + $urandom_range(12 - w); y0 = cy + $urandom_range(12 - h);
            if (f % 2 == 0) begin x0 = cx + 12 - w; end   // let some touch the borders
            if (x0 + w > IM_W) x0 = IM_W - w;
            draw_shape(fe.img, IM_W, x0, y0, w, h, $urandom_range(7));
          end
      end else begin
        int dens;
        dens = 20 + 6 * (f % 7);
        fe.noise = 1'b1;
        foreach (fe.img[i]) fe.img[i] = ($urandom_range(99) < dens);
      end
      ref_label(fe.img, IM_W, IM_H, fe.comp, fe.comps);
      sent_q.push_back(fe);
      for (int i = 0; i < N; i++) begin
        @(negedge clk); in_valid = 1'b1; in_pix = fe.img[i];
        @(negedge clk); in_valid = 1'b0;
        @(negedge clk);
      end
      // A random mask can take longer than a frame time: let it finish
      // before the next frame is sent.
      if (fe.noise) wait (frames_done == f + 1);
    end
    wait (frames_done == FRAMES);
    repeat (5) @(posedge clk);
    check(!fifo_overflow, "input FIFO overflowed");
    check(n_traces > 0 && n_reserved > 0 && n_enter > 0 && n_overflow_frames > 0,
          $sformatf("activity: traces %0d reserved %0d entries %0d overflow frames %0d",
                    n_traces, n_reserved, n_enter, n_overflow_frames));
    $display("traces %0d, reserved-label writes %0d, cluster entries %0d, overflow frames %0d",
             n_traces, n_reserved, n_enter, n_overflow_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
