// tb_smcg: drives the command generator from queue models of the readout
// status, Xo and SCFW image FIFOs, and plays the link transmitter (collects
// QWs per request, acknowledges after size_o QWs). Checks an ACK command,
// a STATUS command on a state change, a ROI_DATA command with image (layout,
// length, pixel data, descriptors, error word with the SCFW invalid flag),
// a ROI_DATA command of a dropped request (no image), and data_sent.
module tb_smcg;
  import edicam_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic st_rd, st_empty = 1, xo_rd, xo_last, xo_empty = 1, img_rd, img_start, img_end, img_err, img_empty = 1;
  ro_status_t st_data; xdesc_t xo_data; logic [191:0] img_data;
  logic ack_req = 0, ack_grant; logic [63:0] ack_word = '0;
  exp_state_e exp_state = EXP_IDLE; ro_state_e ro_state = RO_IDLE; logic [1:0] req_count = 0;
  etu_t exp_time = 64'd4242;
  logic data_sent, tx_req, tx_ack = 0, tx_wr, tx_full = 0; logic [23:0] tx_size; logic [63:0] tx_data;

  smcg dut (.clk, .rst, .st_rd_o(st_rd), .st_data_i(st_data), .st_empty_i(st_empty),
    .xo_rd_o(xo_rd), .xo_data_i(xo_data), .xo_last_i(xo_last), .xo_empty_i(xo_empty),
    .img_rd_o(img_rd), .img_data_i(img_data), .img_start_i(img_start), .img_end_i(img_end),
    .img_err_i(img_err), .img_empty_i(img_empty), .ack_req_i(ack_req), .ack_word_i(ack_word),
    .ack_grant_o(ack_grant), .exp_state_i(exp_state), .ro_state_i(ro_state), .req_count_i(req_count),
    .exp_time_i(exp_time), .data_sent_o(data_sent), .tx_req_o(tx_req), .tx_size_o(tx_size),
    .tx_ack_i(tx_ack), .tx_wr_o(tx_wr), .tx_data_o(tx_data), .tx_full_i(tx_full));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // source models
  ro_status_t sq[$]; logic [64:0] xq[$]; logic [194:0] iq[$];
  // outputs refreshed at the falling edge, stable for the rising edge
  always @(negedge clk) begin
    st_empty = sq.size() == 0;  st_data = st_empty ? '0 : sq[0];
    xo_empty = xq.size() == 0;  {xo_last, xo_data} = xo_empty ? '0 : xq[0];
    img_empty = iq.size() == 0; {img_err, img_start, img_end, img_data} = img_empty ? '0 : iq[0];
  end
  always @(posedge clk) begin
    if (st_rd && !st_empty && !rst) void'(sq.pop_front());
    if (xo_rd && !xo_empty && !rst) void'(xq.pop_front());
    if (img_rd && !img_empty && !rst) void'(iq.pop_front());
  end

  // link transmitter model
  logic [63:0] flat[$]; int plen[$]; logic [63:0] cur[$]; int sent = 0;
  always @(negedge clk) tx_full <= ($urandom % 5 == 0);
  always @(posedge clk) begin
    tx_ack <= 1'b0;
    if (tx_wr && !tx_full && !rst) cur.push_back(tx_data);
    if (tx_req && !tx_ack && cur.size() == int'(tx_size) && tx_size != 0) begin
      tx_ack <= 1'b1; plen.push_back(cur.size()); foreach (cur[i]) flat.push_back(cur[i]); cur.delete();
    end
    if (data_sent && !rst) sent++;
  end

  task automatic wait_pkts(input int n);
    int g = 0;
    while (plen.size() < n && g < 3000) begin @(negedge clk); g++; end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    ro_status_t s; logic [63:0] p[$]; logic [191:0] seg[$]; int k;
    repeat (3) @(negedge clk); rst = 0;
    // ACK
    @(negedge clk); ack_req = 1; ack_word = 64'hA5A5_0000_1234_5678;
    do @(posedge clk); while (!ack_grant);
    @(negedge clk); ack_req = 0;
    wait_pkts(1);
    p.delete(); if (plen.size() > 0) repeat (plen.pop_front()) p.push_back(flat.pop_front());
    check(p.size() == 2 && p[0][63:56] == OP_ACK && p[0][23:0] == 2 && p[1] == 64'hA5A5_0000_1234_5678, "ACK command");
    // STATUS on a state change
    exp_state = EXP_ARM; req_count = 1;
    wait_pkts(1);
    p.delete(); if (plen.size() > 0) repeat (plen.pop_front()) p.push_back(flat.pop_front());
    check(p.size() == 3 && p[0][63:56] == OP_STATUS && p[1][1:0] == EXP_ARM && p[1][5:4] == 2'd1 && p[2] == 4242,
          "STATUS command on state change");
    // ROI_DATA with image: rectangular 2 rows x 20 pixels -> 2 segments per row
    s = '0; s.mode.roip_id = 8'd3; s.mode.nrows = 2; s.mode.y0 = 5; s.sample_time = 1000; s.exposure_time = 900;
    s.n_seg = 4;
    xq.push_back({1'b1, 32'd20, 32'd7});
    for (int i = 0; i < 4; i++) begin
      seg.push_back({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      iq.push_back({i == 3, i == 0, i == 3, seg[i]});   // invalid flag on the last segment
    end
    sq.push_back(s);
    wait_pkts(1);
    p.delete(); if (plen.size() > 0) repeat (plen.pop_front()) p.push_back(flat.pop_front());
    check(p.size() == 1 + 3 + 12 + 1 + 1, "ROI_DATA length with image");
    check(p[0][63:56] == OP_ROI_DATA && p[0][55:48] == 3 && p[0][23:0] == p.size(), "ROI_DATA header");
    check(p[1][63:56] == 3 && p[1][20:0] == 4 && p[2] == 1000 && p[3] == 900, "request parameters");
    k = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3; j++) begin
        if (p[4 + 3*i + j] == seg[i][64*j +: 64]) k++;
      end
    check(k == 12, "image QWs in order");
    check(p[16] == {32'd20, 32'd7}, "row descriptor QW");
    check(p[17][2] == 1'b1 && p[17][1:0] == 2'b00, "error word carries SCFW invalid flag");
    check(sent == 1, "data_sent after ROI_DATA");
    // dropped request, arbitrary 3 rows: no image
    s = '0; s.mode.roip_id = 8'd4; s.mode.arbitrary = 1; s.mode.nrows = 3; s.timeout = 1;
    for (int i = 0; i < 3; i++) xq.push_back({i == 2, 32'(i + 1), 32'(i)});
    sq.push_back(s);
    wait_pkts(1);
    p.delete(); if (plen.size() > 0) repeat (plen.pop_front()) p.push_back(flat.pop_front());
    check(p.size() == 1 + 3 + 3 + 1 && p[0][23:0] == 8, "ROI_DATA length without image");
    check(p[4] == {32'd1, 32'd0} && p[6] == {32'd3, 32'd2}, "descriptors of dropped request");
    check(p[7][1:0] == 2'b10 && p[7][2] == 1'b0, "error word: timeout");
    check(sent == 2 && xq.size() == 0 && iq.size() == 0, "all sources consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
