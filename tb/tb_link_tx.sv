// tb_link_tx: sends packets of several sizes through the link transmitter
// into a model of the 10G link FIFO that drains slowly, so that the
// occupancy thresholds stop and restart writing. Checks framing (sop on the
// first QW, eop on the CRC QW), data order, the CRC against an independent
// reference, the acknowledge, and that no write happens above the high
// threshold.
module tb_link_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  `include "crc_ref.svh"

  logic wr = 0, full, req = 0, ack;
  logic [63:0] din = '0;
  logic [23:0] size = '0;
  logic [63:0] g_data; logic g_sop, g_eop, g_wr;
  logic [7:0] usedw = '0;

  link_tx #(.HIGH_TH(12), .LOW_TH(6)) dut (.clk, .rst, .wr_i(wr), .data_i(din), .full_o(full),
    .req_i(req), .size_i(size), .ack_o(ack), .g10_data_o(g_data), .g10_sop_o(g_sop), .g10_eop_o(g_eop),
    .g10_wr_o(g_wr), .g10_usedw_i(usedw));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 10G link model: FIFO drained every fourth cycle.
  logic [65:0] link_q[$];
  int cyc = 0, over_high = 0, stalls = 0;
  always @(negedge clk) usedw = 8'(link_q.size());
  always @(posedge clk) begin
    cyc++;
    if (g_wr && !rst) begin
      link_q.push_back({g_sop, g_eop, g_data});
      if (usedw > 12) over_high++;
    end
    if (cyc % 4 == 0 && link_q.size() > 0) out_q.push_back(link_q.pop_front());
    if (usedw >= 12 && !rst) stalls++;
  end
  logic [65:0] out_q[$];

  initial begin
    logic [63:0] pkt[$];
    static int sizes[4] = '{1, 5, 40, 3};
    int acks;
    repeat (3) @(negedge clk); rst = 0;
    foreach (sizes[p]) begin
      pkt.delete();
      for (int i = 0; i < sizes[p]; i++) pkt.push_back({$urandom, $urandom});
      fork
        begin
          foreach (pkt[i]) begin
            @(negedge clk); while (full) @(negedge clk);
            wr = 1; din = pkt[i]; @(negedge clk); wr = 0;
          end
        end
        begin
          @(negedge clk); req = 1; size = 24'(sizes[p]);
          acks = 0;
          while (!ack && acks < 5000) begin @(negedge clk); acks++; end
          req = 0;
        end
      join
      check(acks < 5000, "acknowledge received");
      while (link_q.size() > 0) @(negedge clk);
      check(out_q.size() == sizes[p] + 1, $sformatf("packet %0d has size+1 QWs", p));
      for (int i = 0; i < sizes[p]; i++) begin
        check(out_q[i][63:0] == pkt[i] && out_q[i][65] == (i == 0) && !out_q[i][64], "data QW and sop");
      end
      check(out_q[sizes[p]][64] && !out_q[sizes[p]][65] && out_q[sizes[p]][31:0] == ref_crc(pkt), "CRC QW with eop");
      out_q.delete();
    end
    check(stalls > 0, "high threshold reached at least once");
    check(over_high == 0, "no write above the high threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
