// tb_rdp: self-checking test of the ROI data processor. Sends ROIs (mode
// word, row descriptors, image QWs with pixel(col,row) = (3*col + 5*row + 1)
// mod 4096 plus a per-ROI offset) and compares min, max, sum and the
// threshold bits with values computed here pixel by pixel. Cases: a
// rectangular ROI with a bound sROI, an arbitrary ROI with rows of
// different widths (padding pixels), a ROI whose ROIP has no sROI (whole
// ROI), and a ROI outside its sROI (empty result). Also checks that the
// image is consumed at the link rate (one QW per cycle).
module tb_rdp;
  import edicam_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic mode_valid = 0, mode_ready, xp_wr = 0, xp_full, img_wr = 0, img_full, res_valid;
  ro_mode_t mode = '0; xdesc_t xp = '0; logic [63:0] img = '0;
  sroi_t sroi_tab [8]; thr_t thr_tab [16]; rdp_result_t res;

  rdp dut (.clk, .rst, .mode_valid_i(mode_valid), .mode_i(mode), .mode_ready_o(mode_ready),
    .xp_wr_i(xp_wr), .xp_data_i(xp), .xp_full_o(xp_full), .img_wr_i(img_wr), .img_data_i(img),
    .img_full_o(img_full), .sroi_table_i(sroi_tab), .thr_table_i(thr_tab), .res_valid_o(res_valid), .res_o(res));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  rdp_result_t results[$];
  always @(posedge clk) if (res_valid && !rst) results.push_back(res);

  int stall_cycles;
  function automatic logic [11:0] pix(input int c, input int r, input int off);
    return 12'((c * 3 + r * 5 + 1 + off) % 4096);
  endfunction

  // Send one ROI and compute the expected result.
  task automatic roi(input int id, input bit arb, input int y0, input int x0s[$], input int ws[$],
                     input int nrows, input int off, input sroi_t s, output rdp_result_t e);
    logic [191:0] seg; int cnt; int sx0, sx1, sy0, sy1; longint sum; int mn, mx; int nseg, xx, ww, r;
    sx0 = s.valid ? int'(s.x0) : 0; sx1 = s.valid ? int'(s.x1) : 2047;
    sy0 = s.valid ? int'(s.y0) : 0; sy1 = s.valid ? int'(s.y1) : 2047;
    sum = 0; mn = 4095; mx = 0;
    @(negedge clk);
    mode = '0; mode.roip_id = 8'(id); mode.arbitrary = arb; mode.y0 = 11'(y0); mode.nrows = 12'(nrows);
    mode_valid = 1; @(negedge clk); mode_valid = 0;
    fork
      foreach (x0s[i]) begin
        while (xp_full) @(negedge clk);
        xp_wr = 1; xp.x0 = 32'(x0s[i]); xp.width = 32'(ws[i]); @(negedge clk); xp_wr = 0;
      end
      begin
        stall_cycles = 0;
        for (r = 0; r < nrows; r++) begin
          xx = arb ? x0s[r] : x0s[0]; ww = arb ? ws[r] : ws[0];
          nseg = (ww + 15) / 16;
          for (int k = 0; k < nseg; k++) begin
            for (int j = 0; j < 16; j++) begin
              int c; c = xx + 16*k + j;
              seg[j*12 +: 12] = pix(c, y0 + r, off);
              if (c < xx + ww && c >= sx0 && c <= sx1 && y0 + r >= sy0 && y0 + r <= sy1) begin
                sum += pix(c, y0 + r, off);
                if (int'(pix(c, y0 + r, off)) < mn) mn = pix(c, y0 + r, off);
                if (int'(pix(c, y0 + r, off)) > mx) mx = pix(c, y0 + r, off);
              end
            end
            for (int q = 0; q < 3; q++) begin
              while (img_full) begin stall_cycles++; @(negedge clk); end
              img_wr = 1; img = seg[64*q +: 64]; @(negedge clk); img_wr = 0;
            end
          end
        end
      end
    join
    e = '0; e.roip_id = 8'(id); e.min = 12'(mn); e.max = 12'(mx); e.sum = 36'(sum);
    e.min_hit = mn > int'(thr_tab[id % 16].min_th);
    e.max_hit = mx > int'(thr_tab[id % 16].max_th);
    e.sum_hit = sum > longint'(thr_tab[id % 16].sum_th);
  endtask

  task automatic expect_result(input rdp_result_t e, input string what);
    int g = 0;
    while (results.size() == 0 && g < 1000) begin @(negedge clk); g++; end
    if (results.size() == 0) check(0, {what, ": no result"});
    else begin
      rdp_result_t r; r = results.pop_front();
      check(r == e, $sformatf("%s: got id %0d min %0d max %0d sum %0d hits %b%b%b, expected min %0d max %0d sum %0d hits %b%b%b",
            what, r.roip_id, r.min, r.max, r.sum, r.min_hit, r.max_hit, r.sum_hit, e.min, e.max, e.sum, e.min_hit, e.max_hit, e.sum_hit));
    end
  endtask

  initial begin
    rdp_result_t e; sroi_t s, none;
    foreach (sroi_tab[i]) sroi_tab[i] = '0;
    foreach (thr_tab[i]) begin thr_tab[i].min_th = 12'd100; thr_tab[i].max_th = 12'd1000; thr_tab[i].sum_th = 36'd50000; end
    s = '0; s.valid = 1; s.roip_id = 8'd3; s.x0 = 11'd5; s.x1 = 11'd40; s.y0 = 11'd11; s.y1 = 11'd12;
    sroi_tab[2] = s;
    s.roip_id = 8'd7; s.x0 = 11'd500; s.x1 = 11'd600; s.y0 = 11'd0; s.y1 = 11'd5;
    sroi_tab[5] = s;
    none = '0;
    repeat (3) @(negedge clk); rst = 0;

    // 1. rectangular 4 rows x 48 pixels at (0,10), sROI x 5..40, y 11..12
    roi(3, 0, 10, '{0}, '{48}, 4, 0, sroi_tab[2], e);
    check(stall_cycles == 0, "image accepted at one QW per cycle");
    expect_result(e, "rectangular ROI inside sROI");
    // 2. arbitrary 3 rows of different widths, no sROI for id 4
    roi(4, 1, 20, '{3, 17, 100}, '{20, 5, 33}, 3, 1000, none, e);
    expect_result(e, "arbitrary ROI, whole ROI processed");
    // 3. ROI entirely outside its sROI
    roi(7, 0, 100, '{0}, '{32}, 2, 0, sroi_tab[5], e);
    expect_result(e, "ROI outside its sROI");
    check(e.min == 4095 && e.max == 0 && e.sum == 0, "empty result convention");
    // 4. large rectangular ROI with high values, all thresholds exceeded
    thr_tab[9].min_th = 12'd10; thr_tab[9].max_th = 12'd10; thr_tab[9].sum_th = 36'd10;
    roi(9, 0, 0, '{64}, '{160}, 8, 2000, none, e);
    expect_result(e, "large ROI, thresholds exceeded");
    check(e.min_hit && e.max_hit && e.sum_hit, "all three threshold bits set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
