// tb_morph_chain: self-checking testbench of cascaded erosion/dilation units.
//
// Two units in series are configured per frame as an opening (erosion then
// dilation), a closing (dilation then erosion) or two operations of the same
// kind, each stage with its own random SE size. Pixels arrive at half the
// clock rate, so the per-stage FIFOs absorb the padding stalls. Every output
// pixel is compared with the reference model applied twice, and no FIFO may
// overflow.
module tb_morph_chain;
  import surv_pkg::*;
  import morph_ref_pkg::*;

  localparam int IM_W = 32;
  localparam int IM_H = 20;
  localparam int NS   = 2;
  localparam int SEW  = 4;
  localparam int FRAMES = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  morph_op_e      op   [NS];
  logic [SEW-1:0] se_w [NS];
  logic [SEW-1:0] se_h [NS];
  logic           in_valid, in_pix, in_ready, out_valid, out_pix;
  logic [NS-1:0]  fifo_overflow, pad_step;

  morph_chain #(.N_STAGES(NS), .IM_W(IM_W), .IM_H(IM_H), .FIFO_DEPTH(300)) dut (.*);

  int checks = 0, failures = 0, out_idx = 0;
  bit img[], mid[], exp_img[];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_idx >= IM_W*IM_H || out_pix !== exp_img[out_idx]) begin
        failures++;
        if (failures < 10) $display("MISMATCH pixel %0d", out_idx);
      end
      out_idx++;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w[NS], h[NS];
    bit d[NS];
    in_valid = 0; in_pix = 0;
    foreach (op[s]) begin op[s] = OP_ERODE; se_w[s] = 3; se_h[s] = 3; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int s = 0; s < NS; s++) begin
        w[s] = $urandom_range(15, 1) | 1;
        h[s] = $urandom_range(15, 1) | 1;
      end
      case (f % 4)
        0: begin d[0] = 0; d[1] = 1; end   // opening
        1: begin d[0] = 1; d[1] = 0; end   // closing
        2: begin d[0] = 0; d[1] = 0; end
        default: begin d[0] = 1; d[1] = 1; end
      endcase
      rand_image(IM_W, IM_H, 55, img);
      ref_image(img, IM_W, IM_H, w[0], h[0], d[0], mid);
      ref_image(mid, IM_W, IM_H, w[1], h[1], d[1], exp_img);
      out_idx = 0;
      // Stage 1 samples its configuration when its first pixel arrives,
      // a few cycles after stage 0 starts: keep it stable for the frame.
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        op[s] = d[s] ? OP_DILATE : OP_ERODE; se_w[s] = SEW'(w[s]); se_h[s] = SEW'(h[s]);
      end
      for (int i = 0; i < IM_W*IM_H; i++) begin
        in_valid = 1; in_pix = img[i];
        @(negedge clk);
        in_valid = 0;
        @(negedge clk);
      end
      while (out_idx < IM_W*IM_H) @(negedge clk);
      checks++;
      if (out_idx != IM_W*IM_H) begin failures++; $display("frame %0d: output count", f); end
    end
    checks++;
    if (fifo_overflow != '0) begin failures++; $display("FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
