// rdp_ch16_proc: the 16-channel processor of the ROI data processor.
// Channel j sees pixel j of every 192-bit segment; it has two sequential
// comparators (running minimum and maximum) and an accumulator (running
// sum).
//
// A segment is taken when valid_i is high. mask_i (from Pixel hit) says
// which pixels lie in the sROI; only those update their channel. first_i
// restarts the channels (minimum 4095, maximum 0, sum 0, before this
// segment is applied), so consecutive ROIs need no gap. With last_i the
// channel results, including this segment, are written into the output
// FIFO (OUT_DEPTH entries) read by the result unit. ready_o is low while
// that FIFO is full; the feeding controller must then hold back a segment
// that could end a ROI. One register stage per channel; the document's
// deeper pipelining is not reproduced.
module rdp_ch16_proc #(
  parameter int OUT_DEPTH = 2,
  parameter int SUM_W     = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid_i,
  input  logic [191:0] data_i,
  input  logic [15:0]  mask_i,
  input  logic         first_i,
  input  logic         last_i,
  output logic         ready_o,
  // result FIFO
  input  logic         rd_i,
  output logic [16*(24+SUM_W)-1:0] res_o,   // {sum[15..0], max[15..0], min[15..0]}
  output logic         empty_o
);
  import edicam_pkg::*;

  logic [PIX_W-1:0] mn [16], mx [16];
  logic [SUM_W-1:0] sm [16];
  logic [PIX_W-1:0] mn_n [16], mx_n [16];
  logic [SUM_W-1:0] sm_n [16];
  logic [16*(24+SUM_W)-1:0] res_d;
  logic full;

  always_comb begin
    for (int j = 0; j < 16; j++) begin
      logic [PIX_W-1:0] p, bmn, bmx;
      logic [SUM_W-1:0] bsm;
      p   = data_i[j*PIX_W +: PIX_W];
      bmn = first_i ? '1 : mn[j];
      bmx = first_i ? '0 : mx[j];
      bsm = first_i ? '0 : sm[j];
      mn_n[j] = (mask_i[j] && p < bmn) ? p : bmn;
      mx_n[j] = (mask_i[j] && p > bmx) ? p : bmx;
      sm_n[j] = mask_i[j] ? bsm + SUM_W'(p) : bsm;
      res_d[j*PIX_W +: PIX_W]              = mn_n[j];
      res_d[16*PIX_W + j*PIX_W +: PIX_W]   = mx_n[j];
      res_d[32*PIX_W + j*SUM_W +: SUM_W]   = sm_n[j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < 16; j++) begin mn[j] <= '1; mx[j] <= '0; sm[j] <= '0; end
    end else if (valid_i) begin
      for (int j = 0; j < 16; j++) begin mn[j] <= mn_n[j]; mx[j] <= mx_n[j]; sm[j] <= sm_n[j]; end
    end
  end

  sync_fifo #(.W(16*(24+SUM_W)), .DEPTH(OUT_DEPTH)) u_res (
    .clk, .rst, .flush(1'b0), .wr(valid_i && last_i), .wr_data(res_d), .rd(rd_i),
    .rd_data(res_o), .empty(empty_o), .full(full), .count());
  assign ready_o = !full;
endmodule
