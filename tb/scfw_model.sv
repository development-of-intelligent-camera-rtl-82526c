// scfw_model: behavioural model of the sensor control firmware (SCFW) user
// interfaces, for simulation only.
//
// ROI parameter FIFO interface: rectangles (scfw_roi_t) are queued, up to
// PAR_DEPTH. Each rectangle is taken in turn: busy_o rises, after DL cycles
// (descriptor download) one 192-bit segment of 16 pixels per cycle is put in
// the image queue, row by row, ceil(w/16) segments per row, and busy_o
// falls when the rectangle is done. Pixel (col,row) has the value
// pix(col,row) below, so a checker can recompute it. img_start marks the
// first segment of a rectangle written with first=1, img_end the last
// segment of one written with last=1. Image data FIFO interface: the head
// segment is visible while img_empty is low and img_rd pops it. Samples and
// exposure edges are counted.
//
// Clocks: clk runs the control and ROI parameter interfaces, clk_img the
// image data port and the image production (one segment per clk_img
// cycle). They may be the same clock. With TWO_CLK set, busy_o is
// registered on clk so that it changes only in the control domain.
module scfw_model #(
  parameter int DL = 4,
  parameter bit TWO_CLK = 1'b0,
  parameter int PAR_DEPTH = 4,
  parameter bit ERR_ON_LAST = 1'b0   // mark the last segment as invalid
) (
  input  logic                    clk,
  input  logic                    clk_img,
  input  logic                    rst,
  input  logic                    par_wr,
  input  edicam_pkg::scfw_roi_t   par_data,
  output logic                    par_full,
  input  logic                    sample_i,
  input  logic                    exposure_i,
  output logic                    busy_o,
  input  logic                    img_rd,
  output logic [191:0]            img_data,
  output logic                    img_start,
  output logic                    img_end,
  output logic                    img_err,
  output logic                    img_empty
);
  import edicam_pkg::*;

  scfw_roi_t par_q[$];
  logic [194:0] img_q[$];
  int samples = 0;
  int exposures = 0;
  int sample_while_busy = 0;

  function automatic logic [11:0] pix(input int col, input int row);
    return 12'((col * 3 + row * 5 + 1) & 12'hFFF);
  endfunction

  // Queue-derived outputs are refreshed at the falling edge so that they
  // are stable at the rising edge.
  always @(negedge clk) par_full = (par_q.size() >= PAR_DEPTH);
  always @(negedge clk_img) begin
    img_empty = (img_q.size() == 0);
    {img_err, img_start, img_end, img_data} = img_empty ? '0 : img_q[0];
  end

  always @(posedge clk_img) if (img_rd && !img_empty && !rst) void'(img_q.pop_front());

  // busy of the image producer, seen directly or registered on clk
  logic busy_int = 1'b0, busy_r = 1'b0;
  always @(posedge clk) busy_r <= busy_int;
  assign busy_o = TWO_CLK ? busy_r : busy_int;

  logic exp_q = 1'b0;
  always @(posedge clk) begin
    if (par_wr && !par_full && !rst) par_q.push_back(par_data);
    if (sample_i && !rst) begin
      samples++;
      if (busy_o) sample_while_busy++;
    end
    exp_q <= exposure_i;
    if (exposure_i && !exp_q && !rst) exposures++;
  end

  initial begin
    scfw_roi_t r;
    int nseg;
    logic [191:0] d;
    forever begin
      @(posedge clk_img);
      if (!rst && par_q.size() > 0) begin
        r = par_q[0];
        busy_int <= 1'b1;
        repeat (DL) @(posedge clk_img);
        void'(par_q.pop_front());
        nseg = (int'(r.w) + 15) / 16;
        for (int y = 0; y < int'(r.h); y++)
          for (int s = 0; s < nseg; s++) begin
            for (int j = 0; j < 16; j++) d[j*12 +: 12] = pix(int'(r.x) + 16*s + j, int'(r.y) + y);
            img_q.push_back({ERR_ON_LAST && r.last && y == int'(r.h)-1 && s == nseg-1,
                             r.first && y == 0 && s == 0,
                             r.last && y == int'(r.h)-1 && s == nseg-1, d});
            @(posedge clk_img);
          end
        busy_int <= 1'b0;
        @(posedge clk_img);
        if (TWO_CLK) repeat (2) @(posedge clk);   // busy low visible on clk
      end
    end
  end
endmodule
