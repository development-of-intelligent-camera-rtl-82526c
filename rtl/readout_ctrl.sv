// readout_ctrl: executes the readout requests sent by the IPCU.
//
// Request buffer. A request is a mode word (ro_mode_t) plus its row
// descriptors (xdesc_t). Descriptors arrive on the Xi interface and are
// written into two identical FIFOs, XI_DEPTH deep (two requests of up to
// 1024 rows): one feeds the sensor firmware (SCFW), the other is read back
// by the command generator on the Xo interface so that the shape goes back
// to the IPCU with the image. Mode words go into a 2-deep mode FIFO; its
// head is the active request. req_full_o is driven by a counter raised by
// each mode write and lowered by data_sent_i, which the command generator
// pulses when the ROI data command of the active request has been handed to
// the link; the IPCU may write a new request only while it is low.
//
// State machine (IDLE, ARMED, READOUT as specified). IDLE -> ARMED when a
// mode word is present. In ARMED the request is started or dropped:
//   - clear_i drops it (stopped);
//   - immediate: start at once, with a new sample;
//   - triggered: start on trigger_i; without the persistent flag it is
//     dropped (timeout) once the ETU time passes the sampling time;
//   - normal: if the sampling time equals the time of the last sample and
//     that sample is still valid, start without sampling; else start with a
//     sample when the ETU time reaches the sampling time; if it is found
//     already past, start anyway when persistent, else drop (timeout).
// The Sample and Readout unit then either flushes the request's rows from
// the SCFW-side Xi FIFO (dropped request) or, for a started request, waits
// until SCFW is not busy, pulses sample_o for one cycle (unless reusing the
// last sample) and writes one SCFW rectangle per descriptor on the ROI
// parameter interface: one rectangle of nrows rows for a rectangular ROI,
// one single-row rectangle per row for an arbitrary ROI, with first/last
// framing bits. It then waits for as many falling edges of busy_i as it
// wrote rectangles, so the next sample cannot spoil this image. Last, it
// writes a readout status word, pops the mode FIFO and goes to IDLE, or to
// ARMED if another request is waiting.
//
// The time of the last sample is kept and is forgotten sample_hold_i ETU
// later (the sensor's analog store holds a sample for about 2 ms). The
// status word carries the request, the sampling time, the start of the last
// exposure, the number of 16-pixel segments SCFW will deliver, and the
// stopped/timeout flags. Field layouts, the segment count in the status, and
// keeping the state at ARMED while a dropped request is flushed are this
// design's choices.
module readout_ctrl #(
  parameter int XI_DEPTH = 2048
) (
  input  logic                      clk,
  input  logic                      rst,
  // Xi interface (row descriptors of a request; xi_last on its last row)
  input  logic                      xi_wr_i,
  input  edicam_pkg::xdesc_t        xi_data_i,
  input  logic                      xi_last_i,
  output logic                      xi_full_o,
  // mode interface
  input  logic                      mode_wr_i,
  input  edicam_pkg::ro_mode_t      mode_data_i,
  output logic                      req_full_o,
  // control interface
  input  logic                      clear_i,
  input  logic                      trigger_i,
  // time interface
  input  edicam_pkg::etu_t          etu_time_i,
  input  edicam_pkg::etu_t          exp_time_i,
  input  logic [31:0]               sample_hold_i,
  // control status interface
  output edicam_pkg::etu_t          last_sample_o,
  output logic                      last_sample_valid_o,
  output logic [edicam_pkg::ID_W-1:0] cur_id_o,
  output logic [1:0]                req_count_o,
  output edicam_pkg::ro_state_e     state_o,
  // Xo interface (to the command generator)
  input  logic                      xo_rd_i,
  output edicam_pkg::xdesc_t        xo_data_o,
  output logic                      xo_last_o,
  output logic                      xo_empty_o,
  // readout status interface
  input  logic                      st_rd_i,
  output edicam_pkg::ro_status_t    st_data_o,
  output logic                      st_empty_o,
  input  logic                      data_sent_i,
  // ROI parameter FIFO interface (to SCFW)
  output logic                      par_wr_o,
  output edicam_pkg::scfw_roi_t     par_data_o,
  input  logic                      par_full_i,
  // sample control interface
  output logic                      sample_o,
  input  logic                      busy_i
);
  import edicam_pkg::*;

  localparam int XW = $bits(xdesc_t) + 1;

  // ---------------------------------------------------------------- FIFOs
  logic [XW-1:0] xa_q;
  logic          xa_empty, xa_full, xa_rd;
  logic          xb_full;
  ro_mode_t      mode_q;
  logic          mode_empty, mode_rd;
  logic          st_full, st_wr;
  ro_status_t    st_d;
  logic [XW-1:0] xb_q;

  sync_fifo #(.W(XW), .DEPTH(XI_DEPTH)) u_xi_a (
    .clk, .rst, .flush(1'b0), .wr(xi_wr_i), .wr_data({xi_last_i, xi_data_i}),
    .rd(xa_rd), .rd_data(xa_q), .empty(xa_empty), .full(xa_full), .count());
  sync_fifo #(.W(XW), .DEPTH(XI_DEPTH)) u_xi_b (
    .clk, .rst, .flush(1'b0), .wr(xi_wr_i), .wr_data({xi_last_i, xi_data_i}),
    .rd(xo_rd_i), .rd_data(xb_q), .empty(xo_empty_o), .full(xb_full), .count());
  sync_fifo #(.W($bits(ro_mode_t)), .DEPTH(2)) u_mode (
    .clk, .rst, .flush(1'b0), .wr(mode_wr_i), .wr_data(mode_data_i),
    .rd(mode_rd), .rd_data(mode_q), .empty(mode_empty), .full(), .count());
  sync_fifo #(.W($bits(ro_status_t)), .DEPTH(2)) u_status (
    .clk, .rst, .flush(1'b0), .wr(st_wr), .wr_data(st_d),
    .rd(st_rd_i), .rd_data(st_data_o), .empty(st_empty_o), .full(st_full), .count());

  assign xi_full_o = xa_full | xb_full;
  assign {xo_last_o, xo_data_o} = xb_q;

  // Mode FIFO status: occupancy of the request buffer.
  always_ff @(posedge clk) begin
    if (rst) req_count_o <= '0;
    else req_count_o <= req_count_o + 2'(mode_wr_i) - 2'(data_sent_i && req_count_o != 2'd0);
  end
  assign req_full_o = (req_count_o == 2'd2);

  // ------------------------------------------------------ last sample time
  logic  sample_now;
  etu_t  last_sample;
  logic  last_valid;
  always_ff @(posedge clk) begin
    if (rst) begin
      last_sample <= '0;
      last_valid  <= 1'b0;
    end else if (sample_now) begin
      last_sample <= etu_time_i;
      last_valid  <= 1'b1;
    end else if (last_valid && (etu_time_i - last_sample >= {32'd0, sample_hold_i})) begin
      last_valid  <= 1'b0;
    end
  end
  assign last_sample_o       = last_sample;
  assign last_sample_valid_o = last_valid;

  // -------------------------------------------------- readout controller SM
  typedef enum logic [2:0] {
    S_IDLE, S_ARMED, S_FLUSH, S_SAMPLE, S_PARAM, S_BUSYWAIT, S_DONE
  } sr_state_e;

  sr_state_e   st;
  logic        drop_stop, drop_timeout;   // decision in ARMED
  logic        start_sample, start_reuse;
  logic        flag_stop, flag_timeout;
  etu_t        smp_time, smp_exp;
  logic [COORD_W:0] row;
  logic [20:0] n_seg;
  logic [COORD_W:0] n_rect, n_fall;
  logic        busy_q;
  xdesc_t      xa_desc;
  logic        xa_last;

  assign {xa_last, xa_desc} = xa_q;

  always_comb begin
    drop_stop = 1'b0; drop_timeout = 1'b0; start_sample = 1'b0; start_reuse = 1'b0;
    if (clear_i) begin
      drop_stop = 1'b1;
    end else if (mode_q.immediate) begin
      start_sample = 1'b1;
    end else if (mode_q.triggered) begin
      if (trigger_i)                                             start_sample = 1'b1;
      else if (!mode_q.persistent && etu_time_i > mode_q.sample_time) drop_timeout = 1'b1;
    end else begin
      if (last_valid && last_sample == mode_q.sample_time)     start_reuse  = 1'b1;
      else if (etu_time_i == mode_q.sample_time)                start_sample = 1'b1;
      else if (etu_time_i > mode_q.sample_time) begin
        if (mode_q.persistent) start_sample = 1'b1;
        else                   drop_timeout = 1'b1;
      end
    end
  end

  assign sample_now = !busy_i && ((st == S_SAMPLE) ||
                                  (st == S_ARMED && start_sample && !drop_stop && !drop_timeout));
  assign sample_o   = sample_now;

  // Reading the SCFW-side descriptor FIFO.
  assign xa_rd = !xa_empty && ((st == S_FLUSH) || (st == S_PARAM && !par_full_i));

  always_comb begin
    par_wr_o   = (st == S_PARAM) && !xa_empty && !par_full_i;
    par_data_o = '0;
    par_data_o.x = xa_desc.x0[COORD_W-1:0];
    par_data_o.w = xa_desc.width[COORD_W:0];
    if (mode_q.arbitrary) begin
      par_data_o.y     = mode_q.y0 + row[COORD_W-1:0];
      par_data_o.h     = (COORD_W+1)'(1);
      par_data_o.first = (row == '0);
      par_data_o.last  = xa_last;
    end else begin
      par_data_o.y     = mode_q.y0;
      par_data_o.h     = mode_q.nrows;
      par_data_o.first = 1'b1;
      par_data_o.last  = 1'b1;
    end
  end

  always_comb begin
    st_d = '0;
    st_d.mode          = mode_q;
    st_d.sample_time   = smp_time;
    st_d.exposure_time = smp_exp;
    st_d.n_seg         = (flag_stop || flag_timeout) ? '0 : n_seg;
    st_d.stopped       = flag_stop;
    st_d.timeout       = flag_timeout;
  end
  assign st_wr   = (st == S_DONE) && !st_full;
  assign mode_rd = st_wr;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
      flag_stop <= 1'b0; flag_timeout <= 1'b0;
      smp_time <= '0; smp_exp <= '0;
      row <= '0; n_seg <= '0; n_rect <= '0; n_fall <= '0;
      busy_q <= 1'b0;
    end else begin
      busy_q <= busy_i;
      unique case (st)
        S_IDLE: if (!mode_empty) st <= S_ARMED;
        S_ARMED: begin
          flag_stop <= 1'b0; flag_timeout <= 1'b0;
          row <= '0; n_seg <= '0; n_rect <= '0; n_fall <= '0;
          if (drop_stop || drop_timeout) begin
            flag_stop    <= drop_stop;
            flag_timeout <= drop_timeout;
            smp_time     <= '0;
            smp_exp      <= '0;
            st           <= S_FLUSH;
          end else if (start_reuse) begin
            smp_time <= last_sample;
            smp_exp  <= exp_time_i;
            st       <= S_PARAM;
          end else if (start_sample && !busy_i) begin
            smp_time <= etu_time_i;
            smp_exp  <= exp_time_i;
            st       <= S_PARAM;
          end else if (start_sample) begin
            st <= S_SAMPLE;
          end
        end
        S_FLUSH: if (xa_rd && xa_last) st <= S_DONE;
        S_SAMPLE: if (!busy_i) begin
          smp_time <= etu_time_i;
          smp_exp  <= exp_time_i;
          st       <= S_PARAM;
        end
        S_PARAM: if (xa_rd) begin
          row    <= row + 1'b1;
          n_rect <= n_rect + 1'b1;
          n_seg  <= n_seg + (mode_q.arbitrary ? 21'(seg_count(xa_desc.width))
                                              : 21'(seg_count(xa_desc.width)) * 21'(mode_q.nrows));
          if (xa_last) st <= S_BUSYWAIT;
        end
        S_BUSYWAIT: begin
          if (busy_q && !busy_i) n_fall <= n_fall + 1'b1;
          if (n_fall == n_rect) st <= S_DONE;
        end
        S_DONE: if (!st_full) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
      // falling edges are counted from the first rectangle on
      if (st == S_PARAM && busy_q && !busy_i) n_fall <= n_fall + 1'b1;
    end
  end

  always_comb begin
    unique case (st)
      S_IDLE, S_DONE:                 state_o = RO_IDLE;
      S_ARMED, S_FLUSH:               state_o = RO_ARMED;
      default:                        state_o = RO_READOUT;
    endcase
  end
  assign cur_id_o = mode_empty ? '0 : mode_q.roip_id;
endmodule
