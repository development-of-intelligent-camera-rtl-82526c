// smcg: Sensor Module command generator. Builds every command the SM sends
// to the IPCU and hands it to the link transmitter through smcg_core.
//
// Commands (first QW: opcode in 63:56, length in QWs in 23:0):
//   ACK      2 QWs: header, the status word given on the ack interface.
//   STATUS   3 QWs: header, {exposure state, readout state, request buffer
//            occupancy}, start time of the latest exposure. Sent whenever
//            one of those states changes.
//   ROI_DATA header, then from the source FIFOs: the request parameters
//            (3 QWs from the info FIFO), the image (3 QWs per 192-bit
//            segment; only if the request was not dropped), the row
//            descriptors (1 QW per descriptor), and an error word (info
//            FIFO again). After it has been handed to the link, data_sent_o
//            pulses so the readout controller frees the request slot.
// Priority: ACK, then STATUS, then ROI_DATA.
//
// Readout FIFO converters, as in the document: the image data converter
// splits each 192-bit SCFW segment into three QWs (low bits first) and
// marks the third QW of the segment flagged "end" as last; the Xo converter
// packs the two 32-bit row words into one QW; the readout status is turned
// into a status FIFO entry (command length and an image flag) and info FIFO
// entries (parameters, and later the error word). Error detect is a sticky
// bit set by the SCFW invalid-data flag and examined when the image's last
// segment is read, so the error word is written after the image. The unit
// takes the next readout status only after the previous ROI_DATA command
// is out. OPREG and SERVREG register quotes are not built, since the
// register table and its layout are not given. The word layouts are this
// design's own.
module smcg (
  input  logic                    clk,
  input  logic                    rst,
  // readout status interface
  output logic                    st_rd_o,
  input  edicam_pkg::ro_status_t  st_data_i,
  input  logic                    st_empty_i,
  // Xo interface
  output logic                    xo_rd_o,
  input  edicam_pkg::xdesc_t      xo_data_i,
  input  logic                    xo_last_i,
  input  logic                    xo_empty_i,
  // image data FIFO interface of SCFW
  output logic                    img_rd_o,
  input  logic [191:0]            img_data_i,
  input  logic                    img_start_i,
  input  logic                    img_end_i,
  input  logic                    img_err_i,
  input  logic                    img_empty_i,
  // ack interface
  input  logic                    ack_req_i,
  input  logic [63:0]             ack_word_i,
  output logic                    ack_grant_o,
  // status interface
  input  edicam_pkg::exp_state_e  exp_state_i,
  input  edicam_pkg::ro_state_e   ro_state_i,
  input  logic [1:0]              req_count_i,
  input  edicam_pkg::etu_t        exp_time_i,
  output logic                    data_sent_o,
  // link transmitter
  output logic                    tx_req_o,
  output logic [23:0]             tx_size_o,
  input  logic                    tx_ack_i,
  output logic                    tx_wr_o,
  output logic [63:0]             tx_data_o,
  input  logic                    tx_full_i
);
  import edicam_pkg::*;

  localparam logic [1:0] SRC_INFO = 2'd0, SRC_IMAGE = 2'd1, SRC_XDESC = 2'd2;

  // ------------------------------------------------ image data converter
  logic [1:0]  img_ph;
  logic [63:0] img_qw;
  logic        img_last, img_src_rd;
  assign img_qw   = img_data_i[64*img_ph +: 64];
  assign img_last = img_end_i && img_ph == 2'd2;
  assign img_rd_o = img_src_rd && img_ph == 2'd2;
  always_ff @(posedge clk) begin
    if (rst) img_ph <= '0;
    else if (img_src_rd) img_ph <= (img_ph == 2'd2) ? 2'd0 : img_ph + 1'b1;
  end

  // error detect: sticky invalid-data bit over one image
  logic err_sticky, err_now;
  assign err_now = err_sticky || (img_rd_o && img_err_i);
  always_ff @(posedge clk) begin
    if (rst || (img_src_rd && img_last)) err_sticky <= 1'b0;
    else if (img_rd_o && img_err_i)      err_sticky <= 1'b1;
  end

  // ---------------------------------------------------- status converter
  logic        roi_busy;        // a ROI_DATA command is being prepared/sent
  ro_status_t  cur;
  logic [1:0]  par_idx;
  logic        par_phase, err_pending, img_pending;
  logic [64:0] info_d;
  logic        info_wr, info_empty, info_full, info_rd;
  logic [64:0] info_q;
  logic [24:0] sfifo_d, sfifo_q;
  logic        sfifo_wr, sfifo_empty, sfifo_rd;
  logic        has_img;
  logic [23:0] len;

  assign has_img = !st_data_i.stopped && !st_data_i.timeout;
  always_comb begin
    len = 24'd5 + (st_data_i.mode.arbitrary ? 24'(st_data_i.mode.nrows) : 24'd1);
    if (has_img) len = len + 24'd3 * 24'(st_data_i.n_seg);
  end
  assign st_rd_o  = !roi_busy && !st_empty_i;
  assign sfifo_wr = st_rd_o;
  assign sfifo_d  = {has_img, len};

  always_comb begin
    info_wr = 1'b0;
    info_d  = '0;
    if (par_phase) begin
      info_wr = 1'b1;
      unique case (par_idx)
        2'd0: info_d = {1'b0, cur.mode.roip_id, cur.mode.immediate, cur.mode.persistent,
                        cur.mode.triggered, cur.mode.arbitrary, cur.mode.nrows, cur.mode.y0,
                        8'd0, cur.n_seg};
        2'd1: info_d = {1'b0, cur.sample_time};
        default: info_d = {1'b1, cur.exposure_time};
      endcase
    end else if (err_pending && (!img_pending || (img_src_rd && img_last))) begin
      info_wr = 1'b1;
      info_d  = {1'b1, 61'd0, err_now, cur.timeout, cur.stopped};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      roi_busy <= 1'b0; cur <= '0; par_idx <= '0; par_phase <= 1'b0;
      err_pending <= 1'b0; img_pending <= 1'b0;
    end else begin
      if (st_rd_o) begin
        roi_busy    <= 1'b1;
        cur         <= st_data_i;
        par_phase   <= 1'b1;
        par_idx     <= '0;
        err_pending <= 1'b1;
        img_pending <= has_img;
      end
      if (par_phase && !info_full) begin
        par_idx <= par_idx + 1'b1;
        if (par_idx == 2'd2) par_phase <= 1'b0;
      end
      if (img_src_rd && img_last) img_pending <= 1'b0;
      if (!par_phase && info_wr) err_pending <= 1'b0;
      if (data_sent_o) roi_busy <= 1'b0;
    end
  end

  sync_fifo #(.W(65), .DEPTH(8)) u_info (
    .clk, .rst, .flush(1'b0), .wr(info_wr && !info_full), .wr_data(info_d), .rd(info_rd),
    .rd_data(info_q), .empty(info_empty), .full(info_full), .count());
  sync_fifo #(.W(25), .DEPTH(2)) u_status (
    .clk, .rst, .flush(1'b0), .wr(sfifo_wr), .wr_data(sfifo_d), .rd(sfifo_rd),
    .rd_data(sfifo_q), .empty(sfifo_empty), .full(), .count());

  // ------------------------------------------------------------- core
  logic [63:0] src_data [4];
  logic [3:0]  src_empty, src_last, src_rd;
  assign src_data[SRC_INFO]  = info_q[63:0];
  assign src_data[SRC_IMAGE] = img_qw;
  assign src_data[SRC_XDESC] = {xo_data_i.width, xo_data_i.x0};
  assign src_data[3]         = '0;
  assign src_empty = {1'b1, xo_empty_i, img_empty_i, info_empty};
  assign src_last  = {1'b1, xo_last_i, img_last, info_q[64]};
  assign info_rd    = src_rd[SRC_INFO];
  assign img_src_rd = src_rd[SRC_IMAGE];
  assign xo_rd_o    = src_rd[SRC_XDESC];

  logic        load, core_busy, core_done;
  logic [63:0] cmd [3];
  logic [1:0]  cmd_n;
  logic [1:0]  seq [4];
  logic [2:0]  seq_n;
  logic [23:0] size;
  logic [1:0]  cur_cmd;   // 0 ack, 1 status, 2 roi data
  logic [1:0]  kind;

  // status change detection
  exp_state_e sent_exp; ro_state_e sent_ro; logic [1:0] sent_cnt;
  logic status_pending;
  assign status_pending = (exp_state_i != sent_exp) || (ro_state_i != sent_ro) || (req_count_i != sent_cnt);

  always_comb begin
    load = 1'b0; kind = 2'd0; cmd_n = '0; seq_n = '0; size = '0;
    cmd[0] = '0; cmd[1] = '0; cmd[2] = '0;
    seq[0] = SRC_INFO; seq[1] = SRC_IMAGE; seq[2] = SRC_XDESC; seq[3] = SRC_INFO;
    sfifo_rd = 1'b0;
    if (!core_busy) begin
      if (ack_req_i) begin
        load = 1'b1; kind = 2'd0; cmd_n = 2'd2; size = 24'd2;
        cmd[0] = {OP_ACK, 32'd0, 24'd2};
        cmd[1] = ack_word_i;
      end else if (status_pending) begin
        load = 1'b1; kind = 2'd1; cmd_n = 2'd3; size = 24'd3;
        cmd[0] = {OP_STATUS, 32'd0, 24'd3};
        cmd[1] = {58'd0, req_count_i, ro_state_i, exp_state_i};
        cmd[2] = exp_time_i;
      end else if (!sfifo_empty && !info_empty) begin
        load = 1'b1; kind = 2'd2; cmd_n = 2'd1; size = sfifo_q[23:0];
        sfifo_rd = 1'b1;
        cmd[0] = {OP_ROI_DATA, info_q[63:56], 24'd0, sfifo_q[23:0]};
        if (sfifo_q[24]) seq_n = 3'd4;
        else begin
          seq_n = 3'd3; seq[1] = SRC_XDESC; seq[2] = SRC_INFO;
        end
      end
    end
  end
  assign ack_grant_o = load && kind == 2'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_cmd <= '0; sent_exp <= EXP_IDLE; sent_ro <= RO_IDLE; sent_cnt <= '0;
    end else if (load) begin
      cur_cmd <= kind;
      if (kind == 2'd1) begin
        sent_exp <= exp_state_i; sent_ro <= ro_state_i; sent_cnt <= req_count_i;
      end
    end
  end
  assign data_sent_o = core_done && cur_cmd == 2'd2;

  smcg_core u_core (
    .clk, .rst, .load_i(load), .cmd_i(cmd), .cmd_n_i(cmd_n), .fifo_seq_i(seq), .fifo_n_i(seq_n),
    .size_i(size), .busy_o(core_busy), .done_o(core_done),
    .src_data_i(src_data), .src_empty_i(src_empty), .src_last_i(src_last), .src_rd_o(src_rd),
    .tx_req_o, .tx_size_o, .tx_ack_i, .tx_wr_o, .tx_data_o, .tx_full_i);

  // img_start_i is not needed: segments are framed by the end bit.
  logic unused;
  assign unused = img_start_i;
endmodule
