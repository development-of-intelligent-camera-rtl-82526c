// async_fifo: dual-clock FIFO (the "DCFIFO" of the synchronisation
// modules) that carries words of width W from the wclk domain to the rclk
// domain.
//
// Write and read pointers are kept in binary for addressing and in Gray
// code for crossing: each side passes its Gray pointer through two
// flip-flops into the other domain, so only one bit changes per step and a
// sampled pointer is always an old or the new value. full_o is judged in
// the write domain and empty_o in the read domain, both from the possibly
// stale far pointer, so they are pessimistic and never wrong. The read port
// is show-ahead: rdata_o is the oldest word while empty_o is low and rd_i
// pops it. Storage is a plain array with one write port.
//
// Timing: a written word becomes visible at the read side 3 to 4 rclk
// cycles after the write; freed space reaches the write side as late.
// Each side has its own synchronous reset; both are expected to be applied
// together. The document names the DCFIFO but not its depth or pointer
// scheme; the Gray-pointer structure and DEPTH = 2**AW are this design's
// choice.
module async_fifo #(
  parameter int W  = 64,
  parameter int AW = 3
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wr_i,
  input  logic [W-1:0] wdata_i,
  output logic         full_o,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         rd_i,
  output logic [W-1:0] rdata_o,
  output logic         empty_o
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_n;
  assign full_o = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n = wbin + 1'b1;
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr_i && !full_o) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end
  always_ff @(posedge wclk)
    if (wr_i && !full_o) mem[wbin[AW-1:0]] <= wdata_i;

  // read side
  logic [AW:0] rbin_n;
  assign empty_o = (rgray == wgray_r2);
  assign rdata_o = mem[rbin[AW-1:0]];
  assign rbin_n  = rbin + 1'b1;
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd_i && !empty_o) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end
endmodule
