// tb_morph_unit: self-checking testbench of one erosion/dilation unit.
//
// Sends a series of random frames with random structuring element sizes
// (1..15, mostly odd, some even) and both operations through morph_unit,
// sometimes with gaps in the input stream, and compares every output pixel
// with the reference model. For frames sent without gaps it also checks the
// execution time: the last output must come exactly
// (IM_W + floor(w/2)) * (IM_H + floor(h/2)) + 2 cycles after the first pixel
// is written (padded-frame steps, one cycle through the FIFO and the
// two-cycle pipeline latency, less one).
module tb_morph_unit;
  import surv_pkg::*;
  import morph_ref_pkg::*;

  localparam int IM_W = 24;
  localparam int IM_H = 18;
  localparam int SEW  = 4;
  localparam int FRAMES = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  morph_op_e      op;
  logic [SEW-1:0] se_w, se_h;
  logic           in_valid, in_pix, in_ready;
  logic           out_valid, out_pix, fifo_overflow, pad_step, frame_end;

  morph_unit #(.IM_W(IM_W), .IM_H(IM_H), .FIFO_DEPTH(256)) dut (
    .clk, .rst_n, .op, .se_w, .se_h,
    .in_valid, .in_pix, .in_ready,
    .out_valid, .out_pix, .fifo_overflow, .pad_step, .frame_end
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  bit img[], exp_img[];
  int out_idx;
  longint first_take, last_out;
  int pad_cnt;

  // Collect output pixels of the current frame.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_idx < IM_W*IM_H) begin
        checks++;
        if (out_pix !== exp_img[out_idx]) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH pixel %0d (x=%0d y=%0d): got %0b exp %0b",
                     out_idx, out_idx % IM_W, out_idx / IM_W, out_pix, exp_img[out_idx]);
        end
      end else begin
        failures++;
        $display("extra output pixel");
      end
      out_idx++;
      last_out = cycle;
    end
    if (rst_n && pad_step) pad_cnt++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, h, gaps, ew, sh;
    bit dil;
    in_valid = 1'b0; in_pix = 1'b0; op = OP_ERODE; se_w = 4'd3; se_h = 4'd3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      w = $urandom_range(15, 1);
      h = $urandom_range(15, 1);
      if (f < 16) begin w = w | 1; h = h | 1; end
      if (f == 0) begin w = 15; h = 15; end
      if (f == 1) begin w = 1;  h = 1;  end
      dil  = f[0];
      gaps = (f % 3 == 2);
      rand_image(IM_W, IM_H, dil ? 15 : 75, img);
      ref_image(img, IM_W, IM_H, w, h, dil, exp_img);
      out_idx = 0; pad_cnt = 0; first_take = -1;
      @(negedge clk);
      op = dil ? OP_DILATE : OP_ERODE; se_w = SEW'(w); se_h = SEW'(h);
      for (int i = 0; i < IM_W*IM_H; i++) begin
        if (gaps) while ($urandom_range(3) == 0) begin
          in_valid = 1'b0; @(negedge clk);
        end
        in_valid = 1'b1; in_pix = img[i];
        @(posedge clk);
        if (!in_ready) begin failures++; $display("unexpected FIFO full"); end
        if (first_take < 0) first_take = cycle;
        @(negedge clk);
        // Scramble the configuration once the first pixel has been taken
        // (one cycle after it was written): the unit must ignore it.
        if (i >= 1) begin
          se_w = SEW'($urandom); se_h = SEW'($urandom); op = morph_op_e'($urandom_range(1));
        end
      end
      in_valid = 1'b0;
      while (out_idx < IM_W*IM_H) @(negedge clk);
      repeat (4) @(negedge clk);
      ew = w / 2; sh = h / 2;
      checks++;
      if (out_idx != IM_W*IM_H) begin failures++; $display("frame %0d: %0d outputs", f, out_idx); end
      checks++;
      if (pad_cnt != ew*IM_H + sh*(IM_W + ew)) begin
        failures++; $display("frame %0d: %0d padding steps, expected %0d", f, pad_cnt, ew*IM_H + sh*(IM_W + ew));
      end
      if (!gaps) begin
        checks++;
        if (last_out - first_take != longint'((IM_W + ew) * (IM_H + sh) + 2)) begin
          failures++;
          $display("frame %0d: execution %0d cycles, expected %0d", f, last_out - first_take,
                   (IM_W + ew) * (IM_H + sh) + 2);
        end
      end
    end
    checks++;
    if (fifo_overflow) begin failures++; $display("FIFO overflow flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
