// link_rx: receives packets from the 10G link receive interface, checks
// their length and CRC, and passes the QWs on through a FIFO.
//
// The first QW of every EDICAM command carries the command length in QWs
// (bits 23:0, CRC QW excluded). A packet must therefore be: a QW with sop
// holding length L, L-1 more QWs, then one QW with eop holding the CRC-32
// of the L QWs in its low 32 bits. QWs arriving outside a packet (no sop)
// are dropped.
//
// Data interface: the received QWs, one packet at a time, from OUT FIFO
// (OUT_DEPTH words; the link is read only while it has room). The last QW
// of a packet is held back (empty_o stays high) until the CRC QW has
// arrived, so that the control interface can report in the same cycle as
// the last QW is read: cmd_end_o is high during that read, with
// crc_error_o set on a CRC mismatch and crc_o the CRC that was received.
// request_o rises when a new packet's first QW is available and falls at
// the first read or when the packet is aborted.
//
// Length errors: an eop before the expected CRC position, a missing eop at
// that position, or a length of 0. Then cmd_end_o, crc_error_o and
// length_error_o are pulsed at once, OUT FIFO is emptied, and, for a packet
// that is too long, the rest is flushed from the link up to its eop. The
// reader must discard every QW received since the last request_o.
//
// Counters as in the document: one of QWs still expected from the link,
// one of QWs of the packet not yet read from OUT FIFO. Reporting the end
// in the cycle of the last read is this design's reading of the timing.
module link_rx #(
  parameter int OUT_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  // 10G link receive interface
  input  logic [63:0] g10_data_i,
  input  logic        g10_sop_i,
  input  logic        g10_eop_i,
  input  logic        g10_empty_i,
  output logic        g10_rd_o,
  // data interface
  output logic [63:0] data_o,
  output logic        empty_o,
  input  logic        rd_i,
  // control interface
  output logic        request_o,
  output logic        cmd_end_o,
  output logic        crc_error_o,
  output logic        length_error_o,
  output logic [31:0] crc_o
);
  import edicam_pkg::*;

  typedef enum logic [2:0] {R_IDLE, R_DATA, R_CRC, R_WAIT, R_FLUSH} rx_state_e;
  rx_state_e   st;
  logic        out_empty, out_full, out_wr, out_flush, out_rd;
  logic [23:0] g10_cnt;    // data QWs still expected from the link
  logic [23:0] fifo_cnt;   // QWs of the packet not yet read by the user
  logic [31:0] crc, rx_crc;
  logic        crc_done, len_err;

  sync_fifo #(.W(64), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst, .flush(out_flush), .wr(out_wr), .wr_data(g10_data_i), .rd(out_rd),
    .rd_data(data_o), .empty(out_empty), .full(out_full), .count());

  always_comb begin
    g10_rd_o = 1'b0;
    out_wr   = 1'b0;
    len_err  = 1'b0;
    unique case (st)
      R_IDLE:  begin
        g10_rd_o = !g10_empty_i && !out_full;
        out_wr   = g10_rd_o && g10_sop_i && !g10_eop_i && g10_data_i[23:0] != 24'd0;
        len_err  = g10_rd_o && g10_sop_i && (g10_eop_i || g10_data_i[23:0] == 24'd0);
      end
      R_DATA:  begin
        g10_rd_o = !g10_empty_i && !out_full;
        out_wr   = g10_rd_o && !g10_eop_i && !g10_sop_i;
        len_err  = g10_rd_o && (g10_eop_i || g10_sop_i);
      end
      R_CRC:   begin
        g10_rd_o = !g10_empty_i;
        len_err  = g10_rd_o && !g10_eop_i;
      end
      R_FLUSH: g10_rd_o = !g10_empty_i;
      default: ;
    endcase
  end

  assign out_flush = len_err;
  assign empty_o   = out_empty || (fifo_cnt == 24'd1 && !crc_done) || fifo_cnt == 24'd0;
  assign out_rd    = rd_i && !empty_o;

  assign cmd_end_o      = len_err || (out_rd && fifo_cnt == 24'd1);
  assign length_error_o = len_err;
  assign crc_error_o    = len_err || (out_rd && fifo_cnt == 24'd1 && rx_crc != crc);
  assign crc_o          = rx_crc;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; g10_cnt <= '0; fifo_cnt <= '0; crc <= CRC_INIT; rx_crc <= '0;
      crc_done <= 1'b0; request_o <= 1'b0;
    end else begin
      if (out_rd) begin
        fifo_cnt  <= fifo_cnt - 1'b1;
        request_o <= 1'b0;
      end
      unique case (st)
        R_IDLE: if (out_wr) begin
          st        <= (g10_data_i[23:0] == 24'd1) ? R_CRC : R_DATA;
          g10_cnt   <= g10_data_i[23:0] - 1'b1;
          fifo_cnt  <= g10_data_i[23:0];
          crc       <= crc32_qw(CRC_INIT, g10_data_i);
          crc_done  <= 1'b0;
          request_o <= 1'b1;
        end
        R_DATA: if (g10_rd_o) begin
          if (len_err) begin
            st <= g10_eop_i ? R_IDLE : R_FLUSH;
          end else begin
            crc     <= crc32_qw(crc, g10_data_i);
            g10_cnt <= g10_cnt - 1'b1;
            if (g10_cnt == 24'd1) st <= R_CRC;
          end
        end
        R_CRC: if (g10_rd_o) begin
          if (len_err) st <= R_FLUSH;
          else begin
            rx_crc   <= g10_data_i[31:0];
            crc_done <= 1'b1;
            st       <= R_WAIT;
          end
        end
        R_WAIT: if (out_rd && fifo_cnt == 24'd1) st <= R_IDLE;
        R_FLUSH: if (g10_rd_o && g10_eop_i) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
      if (len_err) begin
        fifo_cnt  <= '0;
        request_o <= 1'b0;
        crc_done  <= 1'b0;
      end
    end
  end
endmodule
