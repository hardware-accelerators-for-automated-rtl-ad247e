// contour_tracer: the labeling state machine (FSM_1) of the contour tracing
// labeling unit.
//
// Label memory values: 0 background or hole, 1 cluster pixel not yet labeled,
// 2 reserved label, 3..(3+C_MAX-1) cluster labels.
//
// 1. Write phase: the incoming binary frame is written into the label memory
//    (1 for a cluster pixel, 0 otherwise) while the first and the last pixel
//    equal to 1 are recorded as start point and end point.
// 2. Scan phase: the memory is read in raster order from the start point to
//    the end point, one pixel per cycle. An inside-cluster flag tells whether
//    the scan is between the two sides of a labeled contour:
//      outside, value 1   -> a new cluster: trace its contour (step 3), then
//                            continue inside it;
//      outside, label     -> entering a labeled cluster: raise the flag;
//      inside,  reserved  -> leaving the cluster: lower the flag;
//      inside,  0 or 1    -> hole or interior pixel: part of the cluster;
//    at the right frame border the flag is lowered. Hence holes are filled
//    and a cluster's interior never starts a second trace.
// 3. Contour tracing: 8-connected Moore-neighbour tracing. The direction
//    matrix numbers the neighbours clockwise, 0 = up-right, 1 = right, ...,
//    7 = up. The initial-search table gives, for the direction in which the
//    current contour pixel was reached, the first neighbour to test
//    (6,0,0,2,2,4,4,6 for directions 0..7; the start pixel uses direction 1,
//    "right", the scan direction). The address table gives the offset to add
//    to the current address for each direction (-W+1, +1, W+1, W, W-1, -1,
//    -W-1, -W). One neighbour is read per cycle; on a miss the direction is
//    incremented, on a hit the pixel gets the current label, is reported to
//    the feature machine and becomes the current pixel. Every background
//    neighbour tested during the trace is overwritten with the reserved
//    label, so reserved labels line the outside of the contour on both sides
//    of each row and close the inside-cluster flag there.
//    The trace ends when, standing on the start pixel again, the next move
//    would repeat the first move out of it (or at once for a single pixel).
//    Stopping on the first return to the start pixel would miss the rest of
//    contours that pass through the start pixel twice; this stopping rule is
//    this design's own choice.
// 4. When the end point has been scanned, swap is high for one cycle (the
//    memory banks change at the end of that cycle), then frame_done pulses for
//    one cycle with the number of labeled clusters, while the next frame is
//    already being written.
//
// Up to C_MAX clusters get a label; a further unlabeled cluster found by the
// scan is left unlabeled and label_overflow is reported with frame_done. Neighbours outside the
// frame count as background and are not written.
//
// Interface: in_valid/in_pix/in_ready pixel stream (taken only in the write
// phase); combinational-read memory port mem_addr/mem_we/mem_wdata/mem_rdata;
// contour pixel reports pt_valid/pt_first/pt_x/pt_y and end of contour
// trace_done/trace_label to the feature machine; frame_done, n_clusters and
// label_overflow (valid with frame_done); ev_reserved and ev_enter pulse for each
// reserved-label write and each entry into a labeled cluster during the scan.
module contour_tracer
  import surv_pkg::*;
#(
  parameter int unsigned IM_W = IM_WIDTH,
  parameter int unsigned IM_H = IM_HEIGHT,
  localparam int unsigned XW  = $clog2(IM_W),
  localparam int unsigned YW  = $clog2(IM_H),
  localparam int unsigned AW  = $clog2(IM_W * IM_H)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_pix,
  output logic               in_ready,
  output logic [AW-1:0]      mem_addr,
  output logic               mem_we,
  output logic [LABEL_W-1:0] mem_wdata,
  input  logic [LABEL_W-1:0] mem_rdata,
  output logic               pt_valid,
  output logic               pt_first,
  output logic [XW-1:0]      pt_x,
  output logic [YW-1:0]      pt_y,
  output logic               trace_done,
  output logic [LABEL_W-1:0] trace_label,
  output logic               swap,
  output logic               frame_done,
  output logic [LABEL_W-1:0] n_clusters,
  output logic               label_overflow,
  output logic               ev_reserved,
  output logic               ev_enter
);
  localparam logic [LABEL_W-1:0] LBL_LAST = LABEL_W'(int'(LBL_FIRST) + C_MAX - 1);

  typedef enum logic [2:0] {
    S_WRITE, S_SCAN, S_TSTART, S_TSEARCH, S_TDONE, S_DONE
  } state_e;

  state_e state;

  // Write phase.
  logic [AW-1:0] waddr;
  logic [XW-1:0] wx;
  logic [YW-1:0] wy;
  logic          any_one;
  logic [AW-1:0] start_addr, end_addr;
  logic [XW-1:0] start_x;
  logic [YW-1:0] start_y;

  // Scan phase.
  logic [AW-1:0]      saddr;
  logic [XW-1:0]      sx;
  logic [YW-1:0]      sy;
  logic               in_clu;
  logic [LABEL_W-1:0] label;      // next label to assign
  logic               dropped;
  logic               labels_full; // label LBL_LAST has been assigned

  // Tracing.
  logic [AW-1:0] taddr;
  logic [XW-1:0] tx;
  logic [YW-1:0] ty;
  logic [2:0]    dir, first_dir;
  logic [2:0]    tries;
  logic          moved;

  // Initial-search table (Figure-style direction numbering, see header).
  function automatic logic [2:0] init_search(input logic [2:0] d);
    case (d)
      3'd0: return 3'd6;
      3'd1: return 3'd0;
      3'd2: return 3'd0;
      3'd3: return 3'd2;
      3'd4: return 3'd2;
      3'd5: return 3'd4;
      3'd6: return 3'd4;
      default: return 3'd6;
    endcase
  endfunction

  // Address table: offset to add to the current address, modulo 2**AW.
  function automatic logic [AW-1:0] addr_offset(input logic [2:0] d);
    case (d)
      3'd0: return AW'(1) - AW'(IM_W);
      3'd1: return AW'(1);
      3'd2: return AW'(IM_W + 1);
      3'd3: return AW'(IM_W);
      3'd4: return AW'(IM_W - 1);
      3'd5: return '1;
      3'd6: return '0 - AW'(IM_W + 1);
      default: return '0 - AW'(IM_W);
    endcase
  endfunction

  // Neighbour of the current contour pixel in direction dir.
  logic          n_inb;
  logic [XW-1:0] nx;
  logic [YW-1:0] ny;
  logic [AW-1:0] naddr;
  logic          left_ok, right_ok, up_ok, down_ok;
  logic          is_obj, at_end;

  always_comb begin
    left_ok  = (tx != '0);
    right_ok = (tx != XW'(IM_W - 1));
    up_ok    = (ty != '0);
    down_ok  = (ty != YW'(IM_H - 1));
    nx = tx;
    ny = ty;
    n_inb = 1'b1;
    case (dir)
      3'd0: begin n_inb = right_ok && up_ok;   nx = tx + 1'b1; ny = ty - 1'b1; end
      3'd1: begin n_inb = right_ok;            nx = tx + 1'b1;                 end
      3'd2: begin n_inb = right_ok && down_ok; nx = tx + 1'b1; ny = ty + 1'b1; end
      3'd3: begin n_inb = down_ok;                             ny = ty + 1'b1; end
      3'd4: begin n_inb = left_ok && down_ok;  nx = tx - 1'b1; ny = ty + 1'b1; end
      3'd5: begin n_inb = left_ok;             nx = tx - 1'b1;                 end
      3'd6: begin n_inb = left_ok && up_ok;    nx = tx - 1'b1; ny = ty - 1'b1; end
      default: begin n_inb = up_ok;                            ny = ty - 1'b1; end
    endcase
    naddr = taddr + addr_offset(dir);
  end

  assign is_obj = (mem_rdata != LBL_BG) && (mem_rdata != LBL_RESERVED);
  assign at_end = (saddr == end_addr);

  // Memory port.
  always_comb begin
    mem_addr  = saddr;
    mem_we    = 1'b0;
    mem_wdata = LBL_BG;
    case (state)
      S_WRITE: begin
        mem_addr  = waddr;
        mem_we    = in_valid;
        mem_wdata = in_pix ? LBL_UNLABELED : LBL_BG;
      end
      S_TSTART: begin
        mem_addr  = saddr;
        mem_we    = 1'b1;
        mem_wdata = label;
      end
      S_TSEARCH: begin
        mem_addr = naddr;
        if (n_inb && mem_rdata == LBL_BG) begin
          mem_we    = 1'b1;
          mem_wdata = LBL_RESERVED;
        end else if (n_inb && is_obj && mem_rdata != label) begin
          mem_we    = 1'b1;
          mem_wdata = label;
        end
      end
      default: ;
    endcase
  end

  assign in_ready    = (state == S_WRITE);
  assign ev_reserved = (state == S_TSEARCH) && n_inb && (mem_rdata == LBL_BG);
  assign ev_enter    = (state == S_SCAN) && !in_clu && (mem_rdata >= LBL_FIRST);

  // Contour pixel reports and end of contour.
  logic hit, close_trace;
  assign hit         = (state == S_TSEARCH) && n_inb && is_obj;
  assign close_trace = hit && moved && (taddr == saddr) && (dir == first_dir);

  always_comb begin
    pt_valid = 1'b0;
    pt_first = 1'b0;
    pt_x     = tx;
    pt_y     = ty;
    if (state == S_TSTART) begin
      pt_valid = 1'b1;
      pt_first = 1'b1;
      pt_x     = sx;
      pt_y     = sy;
    end else if (hit && !close_trace) begin
      pt_valid = 1'b1;
      pt_x     = nx;
      pt_y     = ny;
    end
  end

  assign trace_done  = (state == S_TDONE);
  assign swap        = (state == S_DONE);
  assign trace_label = label;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WRITE;
      waddr      <= '0;
      wx         <= '0;
      wy         <= '0;
      any_one    <= 1'b0;
      start_addr <= '0;
      end_addr   <= '0;
      start_x    <= '0;
      start_y    <= '0;
      saddr      <= '0;
      sx         <= '0;
      sy         <= '0;
      in_clu     <= 1'b0;
      label      <= LBL_FIRST;
      dropped    <= 1'b0;
      labels_full <= 1'b0;
      taddr      <= '0;
      tx         <= '0;
      ty         <= '0;
      dir        <= '0;
      first_dir  <= '0;
      tries      <= '0;
      moved      <= 1'b0;
      frame_done <= 1'b0;
      n_clusters <= '0;
      label_overflow <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        S_WRITE: if (in_valid) begin
          if (in_pix) begin
            if (!any_one) begin
              start_addr <= waddr;
              start_x    <= wx;
              start_y    <= wy;
            end
            any_one  <= 1'b1;
            end_addr <= waddr;
          end
          if (waddr == AW'(IM_W * IM_H - 1)) begin
            waddr <= '0;
            wx    <= '0;
            wy    <= '0;
            if (any_one || in_pix) begin
              state  <= S_SCAN;
              in_clu <= 1'b0;
              saddr  <= any_one ? start_addr : waddr;
              sx     <= any_one ? start_x : wx;
              sy     <= any_one ? start_y : wy;
            end else begin
              state <= S_DONE;
            end
          end else begin
            waddr <= waddr + 1'b1;
            if (wx == XW'(IM_W - 1)) begin
              wx <= '0;
              wy <= wy + 1'b1;
            end else begin
              wx <= wx + 1'b1;
            end
          end
        end

        S_SCAN: begin
          logic go_on;
          go_on = 1'b1;
          if (!in_clu) begin
            if (mem_rdata == LBL_UNLABELED) begin
              if (!labels_full) begin
                state <= S_TSTART;
                go_on = 1'b0;
              end else begin
                dropped <= 1'b1;
              end
            end else if (mem_rdata >= LBL_FIRST) begin
              in_clu <= 1'b1;
            end
          end else if (mem_rdata == LBL_RESERVED) begin
            in_clu <= 1'b0;
          end
          if (go_on) begin
            if (at_end) begin
              state <= S_DONE;
            end else begin
              saddr <= saddr + 1'b1;
              if (sx == XW'(IM_W - 1)) begin
                sx     <= '0;
                sy     <= sy + 1'b1;
                in_clu <= 1'b0;
              end else begin
                sx <= sx + 1'b1;
              end
            end
          end
        end

        S_TSTART: begin
          taddr <= saddr;
          tx    <= sx;
          ty    <= sy;
          dir   <= init_search(3'd1);
          tries <= '0;
          moved <= 1'b0;
          state <= S_TSEARCH;
        end

        S_TSEARCH: begin
          if (close_trace) begin
            state <= S_TDONE;
          end else if (hit) begin
            taddr <= naddr;
            tx    <= nx;
            ty    <= ny;
            if (!moved) first_dir <= dir;
            moved <= 1'b1;
            dir   <= init_search(dir);
            tries <= '0;
          end else if (tries == 3'd7) begin
            state <= S_TDONE;      // isolated pixel
          end else begin
            dir   <= dir + 1'b1;
            tries <= tries + 1'b1;
          end
        end

        S_TDONE: begin
          if (label == LBL_LAST) labels_full <= 1'b1;
          else                   label       <= label + 1'b1;
          in_clu <= 1'b1;
          if (at_end) begin
            state <= S_DONE;
          end else begin
            state <= S_SCAN;
            saddr <= saddr + 1'b1;
            if (sx == XW'(IM_W - 1)) begin
              sx     <= '0;
              sy     <= sy + 1'b1;
              in_clu <= 1'b0;
            end else begin
              sx <= sx + 1'b1;
            end
          end
        end

        default: begin  // S_DONE
          frame_done <= 1'b1;
          n_clusters <= labels_full ? LABEL_W'(C_MAX) : label - LBL_FIRST;
          labels_full <= 1'b0;
          label_overflow <= dropped;
          label      <= LBL_FIRST;
          dropped    <= 1'b0;
          any_one    <= 1'b0;
          state      <= S_WRITE;
        end
      endcase
    end
  end

endmodule
