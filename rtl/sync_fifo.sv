// sync_fifo: single-clock first-word-fall-through FIFO.
//
// The word at the head is always visible on rd_data while empty is low; a
// read (rd while !empty) pops it. A write while full is ignored. Storage is
// a plain array so that it maps to block RAM. flush empties the FIFO in one
// cycle. count gives the occupancy. Used wherever the design calls for a
// "simple FIFO interface".
module sync_fifo #(
  parameter int W     = 64,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         flush,
  input  logic         wr,
  input  logic [W-1:0] wr_data,
  input  logic         rd,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) assert (!(wr && full && !flush)) else $error("sync_fifo: write while full");
  end
endmodule
