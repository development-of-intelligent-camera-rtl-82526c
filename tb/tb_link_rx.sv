// tb_link_rx: feeds the link receiver with a good packet, a packet with a
// corrupted CRC, a packet shorter and one longer than its length field, a
// stray QW outside any packet, and a one-QW packet, reading the data
// interface with random stalls. Checks the data, request_o, the end and
// error flags and crc_o.
module tb_link_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  `include "crc_ref.svh"

  logic [63:0] g_data; logic g_sop, g_eop, g_empty, g_rd;
  logic [63:0] dout; logic empty, rd = 0, request, cmd_end, crc_err, len_err; logic [31:0] crc;

  link_rx #(.OUT_DEPTH(8)) dut (.clk, .rst, .g10_data_i(g_data), .g10_sop_i(g_sop), .g10_eop_i(g_eop),
    .g10_empty_i(g_empty), .g10_rd_o(g_rd), .data_o(dout), .empty_o(empty), .rd_i(rd),
    .request_o(request), .cmd_end_o(cmd_end), .crc_error_o(crc_err), .length_error_o(len_err), .crc_o(crc));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 10G receive FIFO model
  logic [65:0] q[$];
  always @(negedge clk) begin
    g_empty = (q.size() == 0);
    {g_sop, g_eop, g_data} = g_empty ? '0 : q[0];
  end
  always @(posedge clk) if (g_rd && !g_empty && !rst) void'(q.pop_front());

  // Reader: random stalls, logs QWs and end events.
  logic [63:0] got[$];
  int ends = 0, crc_errs = 0, len_errs = 0, requests = 0; logic [31:0] last_crc;
  logic req_q = 0;
  always @(negedge clk) rd = !rst && ($urandom % 3 != 0);
  always @(posedge clk) begin
    req_q <= request && !rst;
    if (request && !req_q && !rst) requests++;
    if (rd && !empty && !rst) got.push_back(dout);
    if (cmd_end && !rst) begin
      ends++;
      if (crc_err) crc_errs++;
      if (len_err) len_errs++;
      last_crc <= crc;
      if (len_err) got.delete();   // discard since last request
    end
  end

  task automatic put_pkt(input logic [63:0] words[$], input int extra, input int drop, input bit bad_crc);
    logic [31:0] c;
    c = ref_crc(words) ^ (bad_crc ? 32'h1 : 32'h0);
    for (int i = 0; i < words.size() - drop; i++) q.push_back({i == 0, 1'b0, words[i]});
    for (int i = 0; i < extra; i++) q.push_back({2'b00, 64'hDEAD});
    q.push_back({1'b0, 1'b1, 32'd0, c});
  endtask

  function automatic void mkpkt(ref logic [63:0] w[$], input int n);
    w.delete();
    w.push_back({8'h10, 32'(n * 7), 24'(n)});
    for (int i = 1; i < n; i++) w.push_back({$urandom, $urandom});
  endfunction

  task automatic settle(); repeat (60) @(negedge clk); endtask

  initial begin
    logic [63:0] w[$];
    repeat (3) @(negedge clk); rst = 0;
    // good packet, longer than OUT FIFO
    mkpkt(w, 20); put_pkt(w, 0, 0, 0); settle();
    check(got == w, "good packet delivered in order");
    check(ends == 1 && crc_errs == 0 && len_errs == 0, "end without error");
    check(last_crc == ref_crc(w), "received CRC on crc_o");
    check(requests == 1, "one request per packet");
    got.delete();
    // corrupted CRC
    mkpkt(w, 5); put_pkt(w, 0, 0, 1); settle();
    check(ends == 2 && crc_errs == 1 && len_errs == 0 && got == w, "CRC error flagged at the end");
    got.delete();
    // stray QW, then short packet (eop early)
    q.push_back({2'b00, 64'h1234});
    mkpkt(w, 6); put_pkt(w, 0, 2, 0); settle();
    check(ends == 3 && len_errs == 1 && crc_errs == 2, "short packet: length error");
    got.delete();
    // long packet: extra QWs before eop
    mkpkt(w, 4); put_pkt(w, 3, 0, 0); settle();
    check(ends == 4 && len_errs == 2, "long packet: length error");
    check(q.size() == 0, "long packet flushed to its eop");
    got.delete();
    // one-QW packet still received correctly afterwards
    mkpkt(w, 1); put_pkt(w, 0, 0, 0); settle();
    check(ends == 5 && crc_errs == 3 && len_errs == 2 && got == w, "one-QW packet after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
