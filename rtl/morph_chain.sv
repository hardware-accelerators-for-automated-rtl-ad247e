// morph_chain: N_STAGES erosion/dilation units connected in series, each with
// its own FIFO, operation and structuring element.
//
// Because every unit consumes and produces pixels in raster order, units can be
// cascaded without frame storage in between: an erosion followed by a
// dilation is an opening (noise removal), a dilation followed by an erosion is
// a closing (reconnecting split objects), and four units give an opening
// followed by a closing. The default is two stages, which the configuration
// inputs normally set to an opening as in the prototype. The register on the
// final output is the flip-flop at the end of the cascade.
//
// Interface: in_valid/in_pix/in_ready as for morph_unit; op, se_w and se_h are
// arrays with one entry per stage (stage 0 first); out_valid/out_pix one cycle
// after the last unit's output. fifo_overflow and pad_step have one bit per
// stage.
module morph_chain
  import surv_pkg::*;
#(
  parameter int unsigned N_STAGES   = 2,
  parameter int unsigned IM_W       = IM_WIDTH,
  parameter int unsigned IM_H       = IM_HEIGHT,
  parameter int unsigned FIFO_DEPTH = 2170,
  parameter int unsigned SEW        = $clog2(SE_MAX + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  morph_op_e           op   [N_STAGES],
  input  logic [SEW-1:0]      se_w [N_STAGES],
  input  logic [SEW-1:0]      se_h [N_STAGES],
  input  logic                in_valid,
  input  logic                in_pix,
  output logic                in_ready,
  output logic                out_valid,
  output logic                out_pix,
  output logic [N_STAGES-1:0] fifo_overflow,
  output logic [N_STAGES-1:0] pad_step
);
  logic [N_STAGES:0] v, p;
  logic [N_STAGES-1:0] rdy, fend;

  assign v[0]     = in_valid;
  assign p[0]     = in_pix;
  assign in_ready = rdy[0];

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    morph_unit #(.IM_W(IM_W), .IM_H(IM_H), .FIFO_DEPTH(FIFO_DEPTH), .SEW(SEW)) u_unit (
      .clk, .rst_n,
      .op           (op[i]),
      .se_w         (se_w[i]),
      .se_h         (se_h[i]),
      .in_valid     (v[i]),
      .in_pix       (p[i]),
      .in_ready     (rdy[i]),
      .out_valid    (v[i+1]),
      .out_pix      (p[i+1]),
      .fifo_overflow(fifo_overflow[i]),
      .pad_step     (pad_step[i]),
      .frame_end    (fend[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= 1'b0;
    end else begin
      out_valid <= v[N_STAGES];
      out_pix   <= p[N_STAGES];
    end
  end

endmodule
