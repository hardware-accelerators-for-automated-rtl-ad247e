// tb_morph_datapath: self-checking testbench of the erosion/dilation datapath
// together with its padding controller, without the input FIFO.
//
// The testbench acts as the FIFO: it offers one pixel at a time and advances
// when the controller takes it. Random frames with random SE sizes (1..15)
// and both operations are compared pixel by pixel with the reference model.
// The controller is checked against the padding arithmetic: per frame exactly
// floor(w/2)*IM_H + floor(h/2)*(IM_W + floor(w/2)) padding steps, one step
// per cycle while input is available, and the W/N-boundary signals active on
// the first stream column and row only. Frames with the largest SE (15 x 15)
// are included, as are 1 x 1 and even sizes.
module tb_morph_datapath;
  import surv_pkg::*;
  import morph_ref_pkg::*;

  localparam int IM_W = 20;
  localparam int IM_H = 16;
  localparam int SEW  = 4;
  localparam int FRAMES = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  morph_op_e      op;
  logic [SEW-1:0] se_w, se_h, cur_w, cur_h;
  logic           in_valid, in_pix, in_take, step, w_bnd, n_bnd, es_bnd, s1_keep, row_out, frame_end;
  logic [$clog2(IM_W)-1:0] col;
  logic           out_valid, out_pix;

  morph_ctrl #(.IM_W(IM_W), .IM_H(IM_H)) u_ctrl (
    .clk, .rst_n, .se_w, .se_h, .in_valid, .in_take, .step,
    .w_bnd, .n_bnd, .es_bnd, .s1_keep, .col, .row_out, .frame_end, .cur_w, .cur_h
  );

  morph_datapath #(.IM_W(IM_W)) u_dp (
    .clk, .rst_n, .op, .se_w(cur_w), .se_h(cur_h), .step, .pix(in_pix),
    .w_bnd, .n_bnd, .es_bnd, .s1_keep, .col, .row_out, .out_valid, .out_pix
  );

  int checks = 0, failures = 0;
  bit img[], exp_img[];
  int out_idx, pad_cnt, steps, wb_cnt, nb_cnt;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_idx >= IM_W*IM_H || out_pix !== exp_img[out_idx]) begin
        failures++;
        if (failures < 10) $display("MISMATCH pixel %0d", out_idx);
      end
      out_idx++;
    end
    if (rst_n && step) begin
      steps++;
      if (es_bnd) pad_cnt++;
      if (w_bnd)  wb_cnt++;
      if (n_bnd)  nb_cnt++;
    end
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, h, ew, sh;
    bit dil;
    in_valid = 1'b0; in_pix = 1'b0; op = OP_ERODE; se_w = 4'd3; se_h = 4'd3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      w = $urandom_range(15, 1);
      h = $urandom_range(15, 1);
      if (f < 20) begin w = w | 1; h = h | 1; end
      if (f == 0) begin w = 15; h = 15; end
      if (f == 1) begin w = 1;  h = 1;  end
      if (f == 2) begin w = 15; h = 15; end
      dil = f[0];
      rand_image(IM_W, IM_H, dil ? 15 : 80, img);
      ref_image(img, IM_W, IM_H, w, h, dil, exp_img);
      out_idx = 0; pad_cnt = 0; steps = 0; wb_cnt = 0; nb_cnt = 0;
      @(negedge clk);
      op = dil ? OP_DILATE : OP_ERODE; se_w = SEW'(w); se_h = SEW'(h);
      for (int i = 0; i < IM_W*IM_H; i++) begin
        in_valid = 1'b1; in_pix = img[i];
        do @(posedge clk); while (!in_take);
        @(negedge clk);
        se_w = SEW'($urandom); se_h = SEW'($urandom);
      end
      in_valid = 1'b0;
      while (out_idx < IM_W*IM_H) @(negedge clk);
      repeat (3) @(negedge clk);
      ew = w / 2; sh = h / 2;
      checks++;
      if (pad_cnt != ew*IM_H + sh*(IM_W + ew)) begin
        failures++; $display("frame %0d: %0d padding steps, expected %0d", f, pad_cnt, ew*IM_H + sh*(IM_W + ew));
      end
      checks++;
      if (steps != (IM_W + ew) * (IM_H + sh)) begin
        failures++; $display("frame %0d: %0d steps", f, steps);
      end
      checks++;
      if (wb_cnt != IM_H + sh || nb_cnt != IM_W + ew) begin
        failures++; $display("frame %0d: boundary counts %0d %0d", f, wb_cnt, nb_cnt);
      end
      checks++;
      if (out_idx != IM_W*IM_H) begin failures++; $display("frame %0d: %0d outputs", f, out_idx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
