// link_tx: cuts the QW stream written on its data interface into packets
// for the 10G link transmit interface and appends a CRC to each.
//
// Data interface: a FIFO (IN FIFO, IN_DEPTH words) written with wr_i/data_i;
// full_o tells the writer to wait. Control interface: req_i with size_i, the
// number of QWs of the next packet (at least 1), held until ack_o. The
// state machine moves size_i QWs from the IN FIFO to the link, marking the
// first with sop, then sends one more QW holding the CRC-32 of the packet
// in its low 32 bits, with eop, and pulses ack_o for one cycle.
//
// Flow control ("G10 ready"): the link's FIFO occupancy g10_usedw_i is
// watched; writing stops when it reaches HIGH_TH and resumes in the first
// cycle after it has fallen below LOW_TH. A QW is written in every cycle
// where data is available and the link is ready.
//
// The structure (IN FIFO, QW counter, CRC unit, output multiplexer, ready
// monitor) follows the document. The CRC polynomial and placement, the
// FIFO depth and the threshold values are this design's choices (the
// thresholds are constants of the link supplier).
module link_tx #(
  parameter int IN_DEPTH = 16,
  parameter int USEDW_W  = 8,
  parameter int HIGH_TH  = 240,
  parameter int LOW_TH   = 192
) (
  input  logic               clk,
  input  logic               rst,
  // data interface
  input  logic               wr_i,
  input  logic [63:0]        data_i,
  output logic               full_o,
  // control interface
  input  logic               req_i,
  input  logic [23:0]        size_i,
  output logic               ack_o,
  // 10G link transmit interface
  output logic [63:0]        g10_data_o,
  output logic               g10_sop_o,
  output logic               g10_eop_o,
  output logic               g10_wr_o,
  input  logic [USEDW_W-1:0] g10_usedw_i
);
  import edicam_pkg::*;

  typedef enum logic [1:0] {T_IDLE, T_DATA, T_CRC, T_ACK} tx_state_e;
  tx_state_e   st;
  logic [63:0] in_q;
  logic        in_empty, in_rd;
  logic        g10_ready;
  logic [23:0] qw_cnt;
  logic        first;
  logic [31:0] crc;

  sync_fifo #(.W(64), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst, .flush(1'b0), .wr(wr_i), .wr_data(data_i), .rd(in_rd),
    .rd_data(in_q), .empty(in_empty), .full(full_o), .count());

  // G10 ready: hysteresis on the link FIFO occupancy.
  always_ff @(posedge clk) begin
    if (rst)                                   g10_ready <= 1'b1;
    else if (g10_usedw_i >= USEDW_W'(HIGH_TH)) g10_ready <= 1'b0;
    else if (g10_usedw_i <  USEDW_W'(LOW_TH))  g10_ready <= 1'b1;
  end

  assign in_rd = (st == T_DATA) && !in_empty && g10_ready;

  always_comb begin
    g10_wr_o   = 1'b0;
    g10_sop_o  = 1'b0;
    g10_eop_o  = 1'b0;
    g10_data_o = in_q;
    if (st == T_DATA) begin
      g10_wr_o  = in_rd;
      g10_sop_o = in_rd && first;
    end else if (st == T_CRC) begin
      g10_wr_o   = g10_ready;
      g10_eop_o  = g10_ready;
      g10_data_o = {32'd0, crc};
    end
  end

  assign ack_o = (st == T_ACK);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_IDLE; qw_cnt <= '0; first <= 1'b0; crc <= CRC_INIT;
    end else begin
      unique case (st)
        T_IDLE: if (req_i && size_i != 24'd0) begin
          st <= T_DATA; qw_cnt <= size_i; first <= 1'b1; crc <= CRC_INIT;
        end
        T_DATA: if (in_rd) begin
          first  <= 1'b0;
          crc    <= crc32_qw(crc, in_q);
          qw_cnt <= qw_cnt - 1'b1;
          if (qw_cnt == 24'd1) st <= T_CRC;
        end
        T_CRC: if (g10_ready) st <= T_ACK;
        T_ACK: st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

  // Handshake rule: the request stays up until it is acknowledged.
  property p_req_held;
    @(posedge clk) disable iff (rst) (st != T_IDLE && st != T_ACK) |-> req_i;
  endproperty
  a_req_held: assert property (p_req_held) else $error("link_tx: request dropped before ack");
endmodule
