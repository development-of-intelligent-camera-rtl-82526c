// rdp_pixel_hit: the "Pixel hit" unit of the ROI data processor. For every
// 16-pixel image segment of a ROI it produces a 16-bit mask of the pixels
// that lie inside the selected sROI, with first/last framing bits.
//
// Control ("Pixel in sROI control"): start_i with mode_i and the selected
// sROI (sroi_i, held by the caller until done_o) begins a ROI. Rows y0 ..
// y0+nrows-1 are walked; a rectangular ROI takes one row descriptor from the
// X param FIFO for all its rows, an arbitrary ROI one per row. Each row
// gives ceil(width/16) segments.
//
// Data path ("Pixcoord calc cmp", four stages):
//   1. base registers: row number (loaded or +1) and column of the
//      segment's first pixel (loaded with x0 or +16 per step);
//   2. the 16 column numbers of the segment;
//   3. comparison of each column with the sROI's x bounds and with the end
//      of the row (pixels past the row width are padding), and of the row
//      with the sROI's y bounds;
//   4. the 16 results, with first/last, written into the output FIFO.
// A step is taken at most every other cycle, and only while the FIFO has
// room for everything in flight. The FIFO output is zeroed when no read
// takes place (a register and a multiplexer behind it), so framing bits
// never repeat. done_o pulses when the last segment's mask has been
// written. Stage contents follow the document; FIFO depth and the handling
// of padding pixels are this design's choices.
// Lint note: the valid and roip_id fields of the selected sROI and the mode
// fields not needed for addressing (id, mode bits, sample time) are not
// read, which a linter reports as unused bits.
module rdp_pixel_hit #(
  parameter int OUT_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start_i,
  input  edicam_pkg::ro_mode_t  mode_i,
  input  edicam_pkg::sroi_t     sroi_i,
  output logic                  done_o,
  // X param FIFO (row descriptors)
  input  logic                  xp_empty_i,
  input  edicam_pkg::xdesc_t    xp_data_i,
  output logic                  xp_rd_o,
  // pixel hit FIFO
  input  logic                  rd_i,
  output logic [15:0]           mask_o,
  output logic                  first_o,
  output logic                  last_o,
  output logic                  empty_o
);
  import edicam_pkg::*;

  localparam int CW = COORD_W + 2;   // room for x + width overflow

  // ------------------------------------------------------------ control
  typedef enum logic [1:0] {P_IDLE, P_ROW, P_SEG, P_FLUSH} ph_state_e;
  ph_state_e st;
  ro_mode_t  m;
  logic [COORD_W:0] rows_left;
  logic [COORD_W:0] segs_left;
  logic [CW-1:0]    row_x0, row_end, col_base;
  logic [COORD_W-1:0] cur_row;
  logic             first_pending, gap, step;
  logic [3:0]       inflight;
  logic [$clog2(OUT_DEPTH+1)-1:0] fcount;

  // stage 1 registers
  logic [CW-1:0]      s1_col, s1_end;
  logic [COORD_W-1:0] s1_row;
  logic               s1_v, s1_first, s1_last;
  // stage 2
  logic [CW-1:0]      s2_col [16];
  logic [CW-1:0]      s2_end;
  logic [COORD_W-1:0] s2_row;
  logic               s2_v, s2_first, s2_last;
  // stage 3
  logic [15:0]        s3_mask;
  logic               s3_v, s3_first, s3_last;

  assign xp_rd_o = (st == P_ROW) && !xp_empty_i && (m.arbitrary || rows_left == m.nrows);
  assign step = (st == P_SEG) && !gap && (32'(fcount) + 32'(inflight) + 1 <= OUT_DEPTH);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= P_IDLE; m <= '0; rows_left <= '0; segs_left <= '0; row_x0 <= '0; row_end <= '0;
      first_pending <= 1'b0; gap <= 1'b0; col_base <= '0; cur_row <= '0;
      s1_v <= 1'b0; s1_col <= '0; s1_end <= '0; s1_row <= '0; s1_first <= 1'b0; s1_last <= 1'b0;
    end else begin
      gap  <= step;
      s1_v <= step;
      unique case (st)
        P_IDLE: if (start_i) begin
          m <= mode_i; rows_left <= mode_i.nrows; first_pending <= 1'b1;
          cur_row <= mode_i.y0 - 1'b1;   // incremented when the first row starts
          st <= (mode_i.nrows == '0) ? P_FLUSH : P_ROW;
        end
        P_ROW: if (xp_rd_o || (!m.arbitrary && rows_left != m.nrows)) begin
          if (xp_rd_o) begin
            row_x0  <= CW'(xp_data_i.x0[COORD_W-1:0]);
            row_end <= CW'(xp_data_i.x0[COORD_W-1:0]) + CW'(xp_data_i.width[COORD_W:0]);
            segs_left <= seg_count(xp_data_i.width);
            col_base  <= CW'(xp_data_i.x0[COORD_W-1:0]);
          end else begin
            segs_left <= seg_count(32'(row_end - row_x0));
            col_base  <= row_x0;
          end
          cur_row <= cur_row + 1'b1;
          st      <= P_SEG;
        end
        P_SEG: if (step) begin
          s1_col   <= col_base;
          col_base <= col_base + CW'(16);
          s1_row   <= cur_row;
          s1_end   <= row_end;
          s1_first <= first_pending;
          s1_last  <= (rows_left == 1) && (segs_left == 1);
          first_pending <= 1'b0;
          segs_left <= segs_left - 1'b1;
          if (segs_left == 1) begin
            rows_left <= rows_left - 1'b1;
            st <= (rows_left == 1) ? P_FLUSH : P_ROW;
          end
        end
        P_FLUSH: if (!s1_v && !s2_v && !s3_v) st <= P_IDLE;
        default: st <= P_IDLE;
      endcase
    end
  end


  always_ff @(posedge clk) begin
    if (rst) begin
      s2_v <= 1'b0; s3_v <= 1'b0; s2_first <= 1'b0; s2_last <= 1'b0; s3_first <= 1'b0; s3_last <= 1'b0;
      s2_end <= '0; s2_row <= '0; s3_mask <= '0;
      for (int j = 0; j < 16; j++) s2_col[j] <= '0;
    end else begin
      // stage 2: the 16 column numbers
      s2_v <= s1_v; s2_first <= s1_first; s2_last <= s1_last; s2_end <= s1_end; s2_row <= s1_row;
      for (int j = 0; j < 16; j++) s2_col[j] <= s1_col + CW'(j);
      // stage 3: comparisons
      s3_v <= s2_v; s3_first <= s2_first; s3_last <= s2_last;
      for (int j = 0; j < 16; j++)
        s3_mask[j] <= (s2_col[j] < s2_end) &&
                      (s2_col[j] >= CW'(sroi_i.x0)) && (s2_col[j] <= CW'(sroi_i.x1)) &&
                      (s2_row >= sroi_i.y0) && (s2_row <= sroi_i.y1);
    end
  end

  assign inflight = 4'(s1_v) + 4'(s2_v) + 4'(s3_v);
  assign done_o   = s3_v && s3_last;

  // stage 4: output FIFO with zeroed output when not read
  logic [17:0] f_q;
  logic        f_empty;
  sync_fifo #(.W(18), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst, .flush(1'b0), .wr(s3_v), .wr_data({s3_first, s3_last, s3_mask}), .rd(rd_i),
    .rd_data(f_q), .empty(f_empty), .full(), .count(fcount));
  assign empty_o = f_empty;
  assign {first_o, last_o, mask_o} = (rd_i && !f_empty) ? f_q : '0;
endmodule
