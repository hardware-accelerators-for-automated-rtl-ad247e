// async_fifo: dual-clock FIFO that carries the binary motion mask from the
// segmentation clock domain into the clock domain of the morphology and
// labeling units.
//
// Classic Gray-code pointer design: each side keeps a binary and a Gray write
// or read pointer one bit wider than the address; the Gray pointer of the other
// side is brought across with a two-flop synchronizer. Full and empty are
// therefore pessimistic for two cycles, never wrong. DEPTH must be a power of
// two. The depth is this design's own choice; the system only asks for an
// asynchronous FIFO between the two domains.
//
// Interface: write side (wclk, wrst_n, w_valid, w_data, w_ready), read side
// (rclk, rrst_n, r_valid, r_data, r_ready), first-word-fall-through. Each reset
// clears its own side's pointers; assert both together.
module async_fifo #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             w_valid,
  input  logic [WIDTH-1:0] w_data,
  output logic             w_ready,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             r_valid,
  output logic [WIDTH-1:0] r_data,
  input  logic             r_ready
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain
  logic [AW:0] wbin_next, rbin_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain.
  assign w_ready   = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_next = wbin + 1'b1;

  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wbin[AW-1:0]] <= w_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (w_valid && w_ready) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  // Read domain.
  assign r_valid   = (rgray != wgray_r2);
  assign r_data    = mem[rbin[AW-1:0]];
  assign rbin_next = rbin + 1'b1;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (r_valid && r_ready) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end

endmodule
