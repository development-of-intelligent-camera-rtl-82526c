// rdp: ROI data processor. Computes the minimum, maximum and sum of the
// pixel intensities of a ROI's image, limited to the sROI bound to the
// ROI's ROIP id, and compares them with that ROIP's thresholds; the three
// comparison bits feed the event processor.
//
// Interfaces. Mode IF: a ROI's parameters (ro_mode_t: ROIP id, shape, first
// row, row count) are taken with mode_valid_i while mode_ready_o is high;
// one ROI is processed at a time. X param IF: the ROI's row descriptors,
// written into a FIFO (XP_DEPTH). Image data 64 IF: the image QWs, three
// per 16-pixel segment. sROI table (N_SROI entries) and threshold table
// (N_ROIP entries, indexed by the low bits of the ROIP id) come from the
// register table. The result (rdp_result_t) is presented for one cycle
// with res_valid_o.
//
// Inside: the input data converter (rdp_idc) rebuilds 192-bit segments;
// sROI select (rdp_sroi_select) chooses the boundaries, registered when a
// ROI starts; Pixel hit (rdp_pixel_hit) gives a 16-bit in-sROI mask per
// segment; the processing controller reads one segment and one mask
// together whenever both FIFOs have data and the 16-channel unit
// (rdp_ch16_proc) is ready; the result unit combines the 16 channel results
// (minimum of minima, maximum of maxima, sum of sums), compares them
// ("exceeds": strictly greater) and outputs the result. A ROI without any
// pixel in its sROI reports minimum 4095, maximum 0 and sum 0. The block
// structure is the document's; sizes, comparison sense and word layouts
// are this design's choices.
// Lint note: of the stored mode only the ROIP id is used here (the pixel
// hit detector keeps its own copy of the rest), so the other mode bits of
// the register m are reported as unused by a linter; ph_done is unused too.
module rdp #(
  parameter int N_SROI   = 8,
  parameter int N_ROIP   = 16,
  parameter int XP_DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  // Mode IF
  input  logic                     mode_valid_i,
  input  edicam_pkg::ro_mode_t     mode_i,
  output logic                     mode_ready_o,
  // X param IF
  input  logic                     xp_wr_i,
  input  edicam_pkg::xdesc_t       xp_data_i,
  output logic                     xp_full_o,
  // Image data 64 IF
  input  logic                     img_wr_i,
  input  logic [63:0]              img_data_i,
  output logic                     img_full_o,
  // register table
  input  edicam_pkg::sroi_t        sroi_table_i [N_SROI],
  input  edicam_pkg::thr_t         thr_table_i  [N_ROIP],
  // result towards the event processor
  output logic                     res_valid_o,
  output edicam_pkg::rdp_result_t  res_o
);
  import edicam_pkg::*;

  localparam int SUM_W = 32;
  localparam int RW = 16 * (24 + SUM_W);
  localparam int TW = (N_ROIP > 1) ? $clog2(N_ROIP) : 1;

  // ROI bookkeeping: one ROI in flight
  logic     busy;
  ro_mode_t m;
  sroi_t    sroi_sel, sroi_q;
  logic     start;

  rdp_sroi_select #(.N_SROI(N_SROI)) u_sel (.roip_id_i(mode_i.roip_id), .table_i(sroi_table_i), .sel_o(sroi_sel));

  assign mode_ready_o = !busy;
  assign start = mode_valid_i && !busy;

  // X param FIFO
  xdesc_t xp_q; logic xp_empty, xp_rd;
  sync_fifo #(.W($bits(xdesc_t)), .DEPTH(XP_DEPTH)) u_xp (
    .clk, .rst, .flush(1'b0), .wr(xp_wr_i), .wr_data(xp_data_i), .rd(xp_rd),
    .rd_data(xp_q), .empty(xp_empty), .full(xp_full_o), .count());

  // Input data converter
  logic [191:0] seg; logic seg_empty, seg_rd;
  rdp_idc u_idc (.clk, .rst, .wr_i(img_wr_i), .data_i(img_data_i), .full_o(img_full_o),
    .rd_i(seg_rd), .data_o(seg), .empty_o(seg_empty));

  // Pixel hit
  logic [15:0] mask; logic h_first, h_last, h_empty, h_rd, ph_done;
  rdp_pixel_hit u_hit (.clk, .rst, .start_i(start), .mode_i(mode_i), .sroi_i(sroi_q), .done_o(ph_done),
    .xp_empty_i(xp_empty), .xp_data_i(xp_q), .xp_rd_o(xp_rd),
    .rd_i(h_rd), .mask_o(mask), .first_o(h_first), .last_o(h_last), .empty_o(h_empty));

  // Processing controller
  logic ch_ready;
  assign seg_rd = !seg_empty && !h_empty && ch_ready;
  assign h_rd   = seg_rd;

  logic [RW-1:0] ch_res; logic ch_empty, ch_rd;
  rdp_ch16_proc #(.SUM_W(SUM_W)) u_ch (.clk, .rst, .valid_i(seg_rd), .data_i(seg), .mask_i(mask),
    .first_i(h_first), .last_i(h_last), .ready_o(ch_ready), .rd_i(ch_rd), .res_o(ch_res), .empty_o(ch_empty));

  // Result unit
  logic [PIX_W-1:0] r_min, r_max;
  logic [35:0]      r_sum;
  thr_t             th;
  always_comb begin
    r_min = '1; r_max = '0; r_sum = '0;
    for (int j = 0; j < 16; j++) begin
      if (ch_res[j*PIX_W +: PIX_W] < r_min)          r_min = ch_res[j*PIX_W +: PIX_W];
      if (ch_res[16*PIX_W + j*PIX_W +: PIX_W] > r_max) r_max = ch_res[16*PIX_W + j*PIX_W +: PIX_W];
      r_sum = r_sum + 36'(ch_res[32*PIX_W + j*SUM_W +: SUM_W]);
    end
    th = thr_table_i[m.roip_id[TW-1:0]];
  end
  assign ch_rd = !ch_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; m <= '0; sroi_q <= '0; res_valid_o <= 1'b0; res_o <= '0;
    end else begin
      res_valid_o <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        m      <= mode_i;
        sroi_q <= sroi_sel;
      end
      if (ch_rd) begin
        res_valid_o   <= 1'b1;
        res_o.roip_id <= m.roip_id;
        res_o.min     <= r_min;
        res_o.max     <= r_max;
        res_o.sum     <= r_sum;
        res_o.min_hit <= r_min > th.min_th;
        res_o.max_hit <= r_max > th.max_th;
        res_o.sum_hit <= r_sum > th.sum_th;
        busy          <= 1'b0;
      end
    end
  end

  logic unused;
  assign unused = ph_done;
endmodule
