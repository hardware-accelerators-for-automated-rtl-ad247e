// tb_feature_fsm: self-checking testbench of the feature machine (FSM_2).
//
// Plays random contour-pixel sequences into the machine, each started with
// pt_first and closed with done and a label, and checks the cluster memory
// write (address = label, data = {x_min, y_min, width, height}) and the
// registered feature record one cycle later against minima and maxima
// computed by the testbench.
module tb_feature_fsm;
  import surv_pkg::*;

  localparam int IM_W = 320;
  localparam int IM_H = 240;
  localparam int XW = 9, YW = 8, WW = 9, HW = 8, RW = XW + YW + WW + HW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               pt_valid, pt_first, done, cm_we, feat_valid;
  logic [XW-1:0]      pt_x;
  logic [YW-1:0]      pt_y;
  logic [LABEL_W-1:0] done_label, cm_addr, feat_label;
  logic [RW-1:0]      cm_wdata, feat_rec;

  feature_fsm #(.IM_W(IM_W), .IM_H(IM_H)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_valid = 0; pt_first = 0; done = 0; pt_x = 0; pt_y = 0; done_label = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      int xmin, xmax, ymin, ymax, n, x, y;
      logic [RW-1:0] exp_rec;
      logic [LABEL_W-1:0] lbl;
      n = $urandom_range(40, 1);
      x = $urandom_range(IM_W - 1); y = $urandom_range(IM_H - 1);
      xmin = x; xmax = x; ymin = y; ymax = y;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        pt_valid = 1; pt_first = (k == 0); pt_x = XW'(x); pt_y = YW'(y);
        if (x < xmin) xmin = x;
        if (x > xmax) xmax = x;
        if (y < ymin) ymin = y;
        if (y > ymax) ymax = y;
        // Random 8-neighbour step, kept inside the frame.
        x = x + $urandom_range(2) - 1; y = y + $urandom_range(2) - 1;
        if (x < 0) x = 0;
        if (y < 0) y = 0;
        if (x > IM_W - 1) x = IM_W - 1;
        if (y > IM_H - 1) y = IM_H - 1;
        if ($urandom_range(3) == 0) begin @(negedge clk); pt_valid = 0; end
      end
      @(negedge clk);
      pt_valid = 0;
      lbl = LABEL_W'($urandom_range(63, 3));
      done = 1; done_label = lbl;
      exp_rec = {XW'(xmin), YW'(ymin), WW'(xmax - xmin + 1), HW'(ymax - ymin + 1)};
      #1;
      checks++;
      if (!cm_we || cm_addr != lbl || cm_wdata != exp_rec) begin
        failures++;
        if (failures < 10) $display("cluster %0d: write %b %0d %h exp %h", c, cm_we, cm_addr, cm_wdata, exp_rec);
      end
      @(negedge clk);
      done = 0;
      checks++;
      if (!feat_valid || feat_label != lbl || feat_rec != exp_rec) begin
        failures++;
        if (failures < 10) $display("cluster %0d: feature record wrong", c);
      end
      #1;
      checks++;
      if (cm_we) begin failures++; $display("spurious cluster memory write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
