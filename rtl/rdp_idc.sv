// rdp_idc: input data converter of the ROI data processor. Turns the 64-bit
// image stream back into the 192-bit segments of 16 pixels that the sensor
// firmware produced, so every pixel lies at a fixed position again.
//
// QWs are written into the input FIFO (IN_DEPTH). The state machine shifts
// two QWs into a shift register; when it holds two and a third is at the
// head of the input FIFO, all three are written into the output FIFO at
// once (first QW in bits 63:0). The output FIFO (OUT_DEPTH segments) is
// read by the processing controller. As in the document; the FIFO depths
// are this design's choice. An image always starts on a segment boundary.
module rdp_idc #(
  parameter int IN_DEPTH  = 8,
  parameter int OUT_DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_i,
  input  logic [63:0]  data_i,
  output logic         full_o,
  input  logic         rd_i,
  output logic [191:0] data_o,
  output logic         empty_o
);
  logic [63:0] in_q;
  logic        in_empty, in_rd, out_full, out_wr;
  logic [63:0] shr [2];
  logic [1:0]  shr_cnt;

  sync_fifo #(.W(64), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst, .flush(1'b0), .wr(wr_i), .wr_data(data_i), .rd(in_rd),
    .rd_data(in_q), .empty(in_empty), .full(full_o), .count());
  sync_fifo #(.W(192), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst, .flush(1'b0), .wr(out_wr), .wr_data({in_q, shr[1], shr[0]}), .rd(rd_i),
    .rd_data(data_o), .empty(empty_o), .full(out_full), .count());

  assign out_wr = (shr_cnt == 2'd2) && !in_empty && !out_full;
  assign in_rd  = !in_empty && ((shr_cnt < 2'd2) || !out_full);

  always_ff @(posedge clk) begin
    if (rst) begin
      shr_cnt <= '0; shr[0] <= '0; shr[1] <= '0;
    end else if (out_wr) begin
      shr_cnt <= '0;
    end else if (in_rd) begin
      shr[shr_cnt[0]] <= in_q;
      shr_cnt <= shr_cnt + 1'b1;
    end
  end
endmodule
