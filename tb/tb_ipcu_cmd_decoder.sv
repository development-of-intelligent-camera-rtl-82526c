// tb_ipcu_cmd_decoder: self-checking test of the IPCU command decoder. A
// model of the link receiver's data interface offers QWs of whole commands
// (empty/data, read strobe, end-of-command flag during the last QW, CRC
// error flag, length error pulse). Commands: STATUS, ACK, a ROI_DATA with
// image (rectangular, 2 segments), a ROI_DATA without image (arbitrary, 3
// row descriptors, timeout), an unknown opcode, a command with a CRC
// error, and an aborted one (length error). The RDP side is modelled with
// random mode_ready and img_full back-pressure. Checks: mode fields, the
// image QWs in order, ROI reports, SM status, ACK word, error counters, and
// one QW per cycle when nothing holds the decoder back.
module tb_ipcu_cmd_decoder;
  import edicam_pkg::*;

  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  logic [63:0] rx_data; logic rx_empty, rx_rd, rx_end, rx_crc, rx_len;
  logic mode_valid, mode_ready, img_wr, img_full;
  ro_mode_t mode; logic [63:0] img_data;
  logic roi_done, roi_has_img; logic [7:0] roi_id; etu_t roi_st, roi_et; logic [2:0] roi_err;
  logic st_valid; exp_state_e sm_exp; ro_state_e sm_ro; logic [1:0] sm_cnt; etu_t sm_et;
  logic ack_valid; logic [63:0] ack_word; logic [15:0] crc_cnt, len_cnt, unk_cnt;

  ipcu_cmd_decoder dut (
    .clk, .rst, .rx_data_i(rx_data), .rx_empty_i(rx_empty), .rx_rd_o(rx_rd),
    .rx_cmd_end_i(rx_end), .rx_crc_error_i(rx_crc), .rx_length_error_i(rx_len),
    .mode_valid_o(mode_valid), .mode_o(mode), .mode_ready_i(mode_ready),
    .img_wr_o(img_wr), .img_data_o(img_data), .img_full_i(img_full),
    .roi_done_o(roi_done), .roi_id_o(roi_id), .roi_sample_time_o(roi_st), .roi_exp_time_o(roi_et),
    .roi_has_img_o(roi_has_img), .roi_err_o(roi_err),
    .status_valid_o(st_valid), .sm_exp_state_o(sm_exp), .sm_ro_state_o(sm_ro),
    .sm_req_count_o(sm_cnt), .sm_exp_time_o(sm_et), .ack_valid_o(ack_valid), .ack_word_o(ack_word),
    .crc_err_cnt_o(crc_cnt), .len_err_cnt_o(len_cnt), .unknown_cnt_o(unk_cnt));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // link receiver model: flat QW queue, end flag and CRC-error flag per QW
  logic [63:0] q[$]; bit endq[$]; bit crcq[$];
  bit hold_rdp = 0, abort_now = 0;
  always @(negedge clk) begin
    rx_empty = q.size() == 0;
    rx_data  = rx_empty ? 64'd0 : q[0];
    rx_end   = !rx_empty && endq[0];
    rx_crc   = !rx_empty && endq[0] && crcq[0];
    rx_len   = abort_now;
    mode_ready = hold_rdp ? ($urandom_range(0, 3) == 0) : 1'b1;
    img_full   = hold_rdp ? ($urandom_range(0, 1) == 0) : 1'b0;
  end
  always @(posedge clk) if (rx_rd && !rx_empty) begin
    void'(q.pop_front()); void'(endq.pop_front()); void'(crcq.pop_front());
  end

  task automatic send(input logic [63:0] w[], input bit bad_crc);
    foreach (w[i]) begin q.push_back(w[i]); endq.push_back(i == w.size() - 1); crcq.push_back(bad_crc); end
  endtask

  // monitors
  logic [63:0] img_seen[$];
  ro_mode_t modes[$];
  int n_roi = 0, n_status = 0, n_ack = 0, rd_cycles = 0;
  always @(posedge clk) if (!rst) begin
    if (img_wr) begin
      check(!img_full, "image write while full");
      img_seen.push_back(img_data);
    end
    if (mode_valid) begin
      check(mode_ready, "mode written while not ready");
      modes.push_back(mode);
    end
    n_roi += int'(roi_done); n_status += int'(st_valid); n_ack += int'(ack_valid);
    rd_cycles += int'(rx_rd);
  end

  logic [63:0] roi1[], roi2[];
  int t0;
  initial begin
    rx_empty = 1; rx_data = 0; rx_end = 0; rx_crc = 0; rx_len = 0; mode_ready = 1; img_full = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    // STATUS: req_count 2, readout ARMED, exposure RUN, exposure time 1234
    t0 = rd_cycles;
    send('{{OP_STATUS, 32'd0, 24'd3}, {58'd0, 2'd2, 2'd1, 2'd2}, 64'd1234}, 0);
    repeat (6) @(posedge clk);
    check(n_status == 1 && sm_exp == EXP_RUN && sm_ro == RO_ARMED && sm_cnt == 2'd2 && sm_et == 64'd1234,
          "STATUS decoded");
    check(rd_cycles - t0 == 3, "one QW per cycle");

    // ACK
    send('{{OP_ACK, 32'd0, 24'd2}, 64'hDEAD_BEEF_0123_4567}, 0);
    repeat (5) @(posedge clk);
    check(n_ack == 1 && ack_word == 64'hDEAD_BEEF_0123_4567, "ACK decoded");

    // ROI_DATA with image: ROIP 7, rectangular, triggered, 3 rows from row 12,
    // 2 segments = 6 QWs; length 5 + 1 + 6 = 12
    roi1 = new[12];
    roi1[0] = {OP_ROI_DATA, 8'd7, 24'd0, 24'd12};
    roi1[1] = {8'd7, 1'b0, 1'b0, 1'b1, 1'b0, 12'd3, 11'd12, 8'd0, 21'd2};
    roi1[2] = 64'd500;  roi1[3] = 64'd480;
    for (int i = 0; i < 6; i++) roi1[4 + i] = 64'h1111_0000_0000_0000 + 64'(i);
    roi1[10] = {32'd20, 32'd40};
    roi1[11] = 64'd0;
    hold_rdp = 1;
    send(roi1, 0);
    repeat (60) @(posedge clk);
    hold_rdp = 0;
    check(modes.size() == 1, "one mode passed to the RDP");
    if (modes.size() == 1)
      check(modes[0].roip_id == 8'd7 && modes[0].triggered && !modes[0].arbitrary &&
            modes[0].nrows == 12'd3 && modes[0].y0 == 11'd12 && modes[0].sample_time == 64'd500,
            "mode fields");
    check(img_seen.size() == 6, $sformatf("6 image QWs, got %0d", img_seen.size()));
    foreach (img_seen[i]) check(img_seen[i] == 64'h1111_0000_0000_0000 + 64'(i), "image QW order");
    check(n_roi == 1 && roi_id == 8'd7 && roi_has_img && roi_err == 3'd0 && roi_st == 64'd500 &&
          roi_et == 64'd480, "ROI report with image");

    // ROI_DATA without image: ROIP 9, arbitrary 3 rows, timeout; length 5 + 3
    roi2 = new[8];
    roi2[0] = {OP_ROI_DATA, 8'd9, 24'd0, 24'd8};
    roi2[1] = {8'd9, 1'b0, 1'b0, 1'b0, 1'b1, 12'd3, 11'd0, 8'd0, 21'd5};
    roi2[2] = 64'd0; roi2[3] = 64'd77;
    roi2[4] = 64'd1; roi2[5] = 64'd2; roi2[6] = 64'd3;
    roi2[7] = 64'd2;
    send(roi2, 0);
    repeat (15) @(posedge clk);
    check(modes.size() == 1 && img_seen.size() == 6, "nothing passed to the RDP for a dropped ROI");
    check(n_roi == 2 && roi_id == 8'd9 && !roi_has_img && roi_err == 3'b010, "ROI report, timeout");

    // unknown opcode, CRC error on a STATUS
    send('{{8'h7F, 32'd0, 24'd3}, 64'd1, 64'd2}, 0);
    send('{{OP_STATUS, 32'd0, 24'd3}, {58'd0, 2'd0, 2'd0, 2'd0}, 64'd9}, 1);
    repeat (12) @(posedge clk);
    check(unk_cnt == 16'd1, "unknown command counted");
    check(crc_cnt == 16'd1 && n_status == 2, "CRC error counted");

    // length error: the link receiver aborts in the middle of a ROI_DATA
    q.push_back({OP_ROI_DATA, 8'd3, 24'd0, 24'd20}); endq.push_back(0); crcq.push_back(0);
    repeat (4) @(posedge clk);
    @(negedge clk); abort_now = 1; @(negedge clk); abort_now = 0;
    send('{{OP_ACK, 32'd0, 24'd2}, 64'd42}, 0);
    repeat (6) @(posedge clk);
    check(len_cnt == 16'd1, "length error counted");
    check(n_ack == 2 && ack_word == 64'd42, "decoder restarts after a length error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
