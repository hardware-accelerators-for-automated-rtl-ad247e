// morph_datapath: erosion/dilation kernel for a rectangular structuring element
// of ones, decomposed into a horizontal B1 (SE_w x 1) and a vertical B2
// (1 x SE_h).
//
// Erosion by a rectangle of ones is a count-and-compare. Stage-1 keeps a
// running count of consecutive ones in the current row in one register (ff):
// a one increments it, a zero clears it, and when count plus input reaches
// SE_w the stage emits a hit and keeps the old count (SE_w - 1) for the next
// pixel. Stage-2 does the same down each column on the stage-1 hits, with one
// counter per column held in a row memory, and emits a hit when SE_h
// consecutive rows had a stage-1 hit. Dilation reuses the same kernel through
// duality: stage-0 inverts the input and stage-3 inverts the result. Padding
// is always with ones: the west and north padding enter as preset counts
// (floor(SE_w/2) and floor(SE_h/2)) selected by the W- and N-boundary signals,
// and the east and south padding are ones forced into the stream by the
// E/S-boundary signal from the controller. This follows the structure of the
// published datapath; the pipeline register between stage-1 and stage-2 and
// the registered output are this design's choice.
//
// Timing: one padded-frame position per step; the output for a position
// appears two clock cycles after its step, as out_valid/out_pix, only for
// positions that are real output pixels (row-major order, IM_W x IM_H per
// frame). Word lengths: clog2(SE_MAX+1) bits in stage-1 and stage-2.
module morph_datapath
  import surv_pkg::*;
#(
  parameter int unsigned IM_W = IM_WIDTH,
  parameter int unsigned SEW  = $clog2(SE_MAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  morph_op_e               op,
  input  logic [SEW-1:0]          se_w,
  input  logic [SEW-1:0]          se_h,
  input  logic                    step,
  input  logic                    pix,
  input  logic                    w_bnd,
  input  logic                    n_bnd,
  input  logic                    es_bnd,
  input  logic                    s1_keep,
  input  logic [$clog2(IM_W)-1:0] col,
  input  logic                    row_out,
  output logic                    out_valid,
  output logic                    out_pix
);
  // Stage-0: optional inversion, then the east/south padding multiplexer.
  logic a;
  assign a = es_bnd ? 1'b1 : ((op == OP_DILATE) ? ~pix : pix);

  // Stage-1: running sum of consecutive ones along the row.
  logic [SEW-1:0] ff, base1, sum1;
  logic           hit1;
  assign base1 = w_bnd ? (se_w >> 1) : ff;
  assign sum1  = base1 + SEW'(a);
  assign hit1  = a && (sum1 == se_w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ff <= '0;
    else if (step) ff <= !a ? '0 : (hit1 ? base1 : sum1);
  end

  // Pipeline register between stage-1 and stage-2.
  logic                    p_valid, p_hit, p_nbnd, p_row;
  logic [$clog2(IM_W)-1:0] p_col;
  logic [SEW-1:0]          p_h;
  morph_op_e               p_op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_hit   <= 1'b0;
      p_nbnd  <= 1'b0;
      p_row   <= 1'b0;
      p_col   <= '0;
      p_h     <= SEW'(1);
      p_op    <= OP_ERODE;
    end else begin
      p_valid <= step && s1_keep;
      p_hit   <= hit1;
      p_nbnd  <= n_bnd;
      p_row   <= row_out;
      p_col   <= col;
      p_h     <= se_h;
      p_op    <= op;
    end
  end

  // Stage-2: per-column count of consecutive rows with a stage-1 hit.
  logic [SEW-1:0] row_mem [IM_W];
  logic [SEW-1:0] base2, sum2;
  logic           hit2;
  assign base2 = p_nbnd ? (p_h >> 1) : row_mem[p_col];
  assign sum2  = base2 + SEW'(p_hit);
  assign hit2  = p_hit && (sum2 == p_h);

  always_ff @(posedge clk) begin
    if (p_valid) row_mem[p_col] <= !p_hit ? '0 : (hit2 ? base2 : sum2);
  end

  // Stage-3: optional inversion, registered output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= 1'b0;
    end else begin
      out_valid <= p_valid && p_row;
      out_pix   <= (p_op == OP_DILATE) ? ~hit2 : hit2;
    end
  end

endmodule
