// tb_vga_output: testbench of the display path at a reduced size (8 x 6 frame
// pixels shown in a 16 x 12 raster with short porches).
//
// Each round selects an output mode and an overlay setting, loads a few random
// boxes, and sends one frame on every source at once with random gaps (the
// selected source must be written, the others only advance their own pixel
// counters). The testbench then checks one complete displayed frame pixel by
// pixel against its own model: the selected source mapped to gray (RGB video
// as (R + 2G + B) / 4, masks as 0 / 255, labels x 4), box edges as 255 when the overlay is on,
// every frame pixel repeated over a 2 x 2 block. It also checks the raster
// timing: line length, hsync and vsync pulse widths, visible pixels per line
// and lines per frame, and black colours outside the visible area. All four
// modes with and without overlay are taken, and a box-table clear.
module tb_vga_output;
  import surv_pkg::*;

  localparam int IM_W = 8, IM_H = 6, N = IM_W * IM_H;
  localparam int NB = 4;
  localparam int H_VIS = 16, H_FP = 2, H_SYNC = 3, H_BP = 2;
  localparam int V_VIS = 12, V_FP = 1, V_SYNC = 2, V_BP = 1;
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP, V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int RW = $clog2(IM_W) + $clog2(IM_H) + $clog2(IM_W + 1) + $clog2(IM_H + 1);
  localparam int ROUNDS = 16;

  logic clk = 0, clk_pix = 0, rst_n = 0, rst_pix_n = 0;
  always #5 clk = ~clk;
  always #7 clk_pix = ~clk_pix;

  logic [1:0] mode;
  logic overlay_en, video_valid, seg_valid, seg_pix, morph_valid, morph_pix, label_valid;
  logic [23:0] video_rgb;
  logic [LABEL_W-1:0] label_pix;
  logic box_we, box_clear;
  logic [$clog2(NB)-1:0] box_addr;
  logic [RW-1:0] box_wdata;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync, vga_de;

  vga_output #(.IM_W(IM_W), .IM_H(IM_H), .N_BOX(NB),
               .H_VIS(H_VIS), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
               .V_VIS(V_VIS), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (ROUNDS * 6 * H_TOT * V_TOT + 2000) @(posedge clk_pix);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Timing monitor: line and pulse lengths, from the sync outputs.
  int hs_len = 0, line_len = 0, de_in_line = 0, vs_lines = 0, lines_in_frame = 0, de_lines = 0;
  bit hs_seen = 0, vs_seen = 0;
  always @(posedge clk_pix) if (rst_pix_n) begin
    if (!vga_de) check(vga_r == 0 && vga_g == 0 && vga_b == 0, "colour outside the visible area");
    check(vga_r == vga_g && vga_g == vga_b, "gray output");
    line_len++;
    if (vga_de) de_in_line++;
    if (!vga_hsync) hs_len++;
    if (vga_hsync && hs_len > 0) begin
      check(hs_len == H_SYNC, $sformatf("hsync width %0d", hs_len));
      hs_len = 0;
    end
    if (!vga_hsync && hs_len == 1) begin
      if (hs_seen) begin
        check(line_len == H_TOT, $sformatf("line length %0d", line_len));
        check(de_in_line == 0 || de_in_line == H_VIS, $sformatf("visible pixels in a line %0d", de_in_line));
      end
      if (de_in_line != 0) de_lines++;
      hs_seen = 1;
      line_len = 0; de_in_line = 0;
      lines_in_frame++;
      if (!vga_vsync) vs_lines++;
    end
    if (!vga_vsync && !vs_seen) begin
      if (lines_in_frame > 0 && de_lines > 0) begin
        check(de_lines == V_VIS, $sformatf("visible lines %0d", de_lines));
      end
      de_lines = 0;
    end
    if (vga_vsync && vs_seen) begin
      check(vs_lines == V_SYNC, $sformatf("vsync lines %0d", vs_lines));
      vs_lines = 0;
    end
    vs_seen = !vga_vsync;
  end

  // Box model.
  int bx[NB], by[NB], bw[NB], bh[NB];
  bit bv[NB];
  function automatic bit on_box(int x, int y);
    for (int b = 0; b < NB; b++) if (bv[b] && bw[b] > 0 && bh[b] > 0) begin
      int x1, y1;
      bit inx, iny;
      x1 = bx[b] + bw[b] - 1;
      y1 = by[b] + bh[b] - 1;
      inx = x >= bx[b] && x <= x1;
      iny = y >= by[b] && y <= y1;
      if ((iny && (x == bx[b] || x == x1)) || (inx && (y == by[b] || y == y1))) return 1;
    end
    return 0;
  endfunction

  byte unsigned expect_img[N];

  initial begin
    mode = 0; overlay_en = 0; video_valid = 0; seg_valid = 0; morph_valid = 0; label_valid = 0;
    video_rgb = 0; seg_pix = 0; morph_pix = 0; label_pix = 0;
    box_we = 0; box_clear = 0; box_addr = 0; box_wdata = 0;
    foreach (bv[b]) bv[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; rst_pix_n = 1;
    for (int r = 0; r < ROUNDS; r++) begin
      int vid[N];
      bit seg[N], mor[N];
      int lab[N];
      int n_ovl;
      n_ovl = 0;
      @(negedge clk);
      mode = 2'(r % 4);
      overlay_en = (r / 4) % 2;
      if (r == 12) begin
        box_clear = 1; @(negedge clk); box_clear = 0;
        foreach (bv[b]) bv[b] = 0;
      end else begin
        for (int b = 0; b < NB; b++) if ($urandom_range(1)) begin
          bx[b] = $urandom_range(IM_W - 1); by[b] = $urandom_range(IM_H - 1);
          bw[b] = $urandom_range(IM_W - bx[b], 1); bh[b] = $urandom_range(IM_H - by[b], 1);
          bv[b] = 1;
          box_we = 1; box_addr = b[$clog2(NB)-1:0];
          box_wdata = {$clog2(IM_W)'(bx[b]), $clog2(IM_H)'(by[b]), $clog2(IM_W + 1)'(bw[b]), $clog2(IM_H + 1)'(bh[b])};
          @(negedge clk);
          box_we = 0;
        end
      end
      for (int i = 0; i < N; i++) begin
        vid[i] = int'($urandom_range(24'hFFFFFF)); seg[i] = $urandom_range(1); mor[i] = $urandom_range(1); lab[i] = $urandom_range(63);
        case (mode)
          0: expect_img[i] = 8'(((vid[i] >> 16) + 2 * ((vid[i] >> 8) & 255) + (vid[i] & 255)) / 4);
          1: expect_img[i] = seg[i] ? 255 : 0;
          2: expect_img[i] = mor[i] ? 255 : 0;
          default: expect_img[i] = 8'(lab[i] * 4);
        endcase
        if (overlay_en && on_box(i % IM_W, i / IM_W)) begin expect_img[i] = 255; n_ovl++; end
      end
      // All four sources send a frame, each with its own random gaps.
      fork
        for (int i = 0; i < N; i++) begin
          while ($urandom_range(2) == 0) @(negedge clk);
          video_valid = 1; video_rgb = 24'(vid[i]); @(negedge clk); video_valid = 0;
        end
        for (int i = 0; i < N; i++) begin
          while ($urandom_range(2) == 0) @(negedge clk);
          seg_valid = 1; seg_pix = seg[i]; @(negedge clk); seg_valid = 0;
        end
        for (int i = 0; i < N; i++) begin
          while ($urandom_range(2) == 0) @(negedge clk);
          morph_valid = 1; morph_pix = mor[i]; @(negedge clk); morph_valid = 0;
        end
        for (int i = 0; i < N; i++) begin
          while ($urandom_range(2) == 0) @(negedge clk);
          label_valid = 1; label_pix = 6'(lab[i]); @(negedge clk); label_valid = 0;
        end
      join
      // Wait for the start of a new displayed frame, then check all of it.
      @(posedge clk_pix iff !vga_vsync);
      @(posedge clk_pix iff vga_vsync);
      begin
        int p;
        p = 0;
        while (p < H_VIS * V_VIS) begin
          @(posedge clk_pix);
          if (vga_de) begin
            int x, y;
            x = p % H_VIS;
            y = p / H_VIS;
            check(vga_r == expect_img[(y / 2) * IM_W + x / 2],
                  $sformatf("round %0d mode %0d pixel (%0d,%0d): %0d, expected %0d", r, mode, x, y, vga_r, expect_img[(y / 2) * IM_W + x / 2]));
            p++;
          end
        end
      end
    end
    $display("rounds %0d", ROUNDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
