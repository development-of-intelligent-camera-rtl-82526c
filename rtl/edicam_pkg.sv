// edicam_pkg: types and constants shared by the Sensor Module (SM) and the
// Image Processing and Control Unit (IPCU) logic of the EDICAM camera.
//
// System time (ETU time) is a 64-bit count of 100 ns units. Link traffic is
// carried in 64-bit quadwords (QW). Image data leaves the sensor firmware in
// 192-bit segments of sixteen 12-bit pixels. The three state encodings
// (exposure IDLE/ARM/RUN, readout IDLE/ARMED/READOUT) follow the
// specification; the bit layouts of request, status and command words are
// this design's own, because no bit layout is published for them.
package edicam_pkg;

  localparam int ETU_W   = 64;   // ETU counter width
  localparam int QW_W    = 64;   // link word width
  localparam int PIX_W   = 12;   // bits per pixel
  localparam int SEG_PIX = 16;   // pixels per image segment
  localparam int SEG_W   = PIX_W * SEG_PIX;  // 192-bit image segment
  localparam int COORD_W = 11;   // row/column coordinate (1280 x 1024 sensor)
  localparam int ID_W    = 8;    // ROIP identifier

  typedef logic [ETU_W-1:0] etu_t;

  typedef enum logic [1:0] {EXP_IDLE = 2'd0, EXP_ARM = 2'd1, EXP_RUN = 2'd2} exp_state_e;
  typedef enum logic [1:0] {RO_IDLE = 2'd0, RO_ARMED = 2'd1, RO_READOUT = 2'd2} ro_state_e;

  // Exposure parameters (ETU units).
  typedef struct packed {
    etu_t        t0;          // start time of the first exposure
    logic [31:0] t_exposure;  // exposure length
    logic [31:0] t_repetition;// exposure period
    logic [15:0] n_loop;      // number of exposures, 0 = endless
    logic        triggered;   // start on trigger instead of t0
    logic        immediate;   // start at once
  } exp_param_t;

  // Readout request parameters (one entry of the mode FIFO).
  typedef struct packed {
    logic [ID_W-1:0]    roip_id;
    logic               immediate;
    logic               persistent;
    logic               triggered;
    logic               arbitrary;   // 1: one row descriptor per row
    logic [COORD_W-1:0] y0;          // first row
    logic [COORD_W:0]   nrows;       // number of rows, 1..1024
    etu_t               sample_time;
  } ro_mode_t;

  // Row descriptor (one entry of the Xi / Xo FIFOs): two 32-bit words.
  typedef struct packed {
    logic [31:0] width;   // pixels in the row
    logic [31:0] x0;      // first column
  } xdesc_t;

  // Readout status written when a request has been handled.
  typedef struct packed {
    ro_mode_t    mode;
    etu_t        sample_time;   // actual sampling time
    etu_t        exposure_time; // start of the last exposure before sampling
    logic [20:0] n_seg;         // image segments that SCFW will deliver
    logic        stopped;       // cancelled by clear
    logic        timeout;       // sampling time passed
  } ro_status_t;

  // ROI parameter word towards the sensor firmware (one rectangle).
  typedef struct packed {
    logic               first;
    logic               last;
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [COORD_W:0]   w;
    logic [COORD_W:0]   h;
  } scfw_roi_t;

  // sROI: a rectangle in full-image coordinates (bounds inclusive) bound
  // to one ROIP id.
  typedef struct packed {
    logic               valid;
    logic [ID_W-1:0]    roip_id;
    logic [COORD_W-1:0] x0, x1, y0, y1;
  } sroi_t;

  // Thresholds of the image parameters of one ROIP.
  typedef struct packed {
    logic [PIX_W-1:0] min_th;
    logic [PIX_W-1:0] max_th;
    logic [35:0]      sum_th;
  } thr_t;

  // Result of processing one ROI.
  typedef struct packed {
    logic [ID_W-1:0]  roip_id;
    logic [PIX_W-1:0] min;
    logic [PIX_W-1:0] max;
    logic [35:0]      sum;
    logic             min_hit;  // min > min_th
    logic             max_hit;  // max > max_th
    logic             sum_hit;  // sum > sum_th
  } rdp_result_t;

  // Event processor configuration (register table contents).
  localparam int EP_MAX_IN  = 8;  // max inputs per event
  localparam int EP_MAX_ACT = 8;  // max action bits per event

  typedef enum logic [1:0] {IN_HOST = 2'd0, IN_IMAGE = 2'd1, IN_EXT_EVT = 2'd2, IN_ETU = 2'd3} ep_in_type_e;
  typedef enum logic [1:0] {IMG_MIN = 2'd0, IMG_MAX = 2'd1, IMG_SUM = 2'd2} ep_img_sel_e;
  typedef enum logic [1:0] {EE_CONTROL = 2'd0, EE_SET = 2'd1, EE_TOGGLE = 2'd2} ep_ee_mode_e;

  typedef struct packed {
    ep_in_type_e     type_sel;   // which channel drives the input
    logic            host_val;   // HOST channel value
    logic [ID_W-1:0] ref_id;     // Image channel: reference ROIP id
    ep_img_sel_e     img_sel;    // Image channel: min, max or sum bit
    logic [3:0]      ext_sel;    // External/event channel: external input
    logic [3:0]      evt_sel;    //   ... or event output
    logic            use_event;  //   1: event output, 0: external input
    ep_ee_mode_e     ee_mode;    //   control, set on edge, toggle on edge
    logic            ee_falling; //   edge: 0 rising, 1 falling
    etu_t            etu_ref;    // ETU channel: reference time
  } ep_in_cfg_t;

  typedef struct packed {
    logic [EP_MAX_IN-1:0]  in_inv;   // negate inputs
    logic                  out_inv;  // negate the AND
    logic [31:0]           delay;    // state change delay in ETU
    logic [EP_MAX_ACT-1:0] act_inv;  // action invert bits
  } ep_ev_cfg_t;

  typedef struct packed {
    logic       oe;       // output enable
    logic [3:0] evt;      // event multiplexer
    logic [2:0] bit_sel;  // action multiplexer
  } ep_act_sel_t;

  // Command opcodes (first QW, bits 63:56); bits 23:0 hold the command
  // length in QWs, header included, CRC excluded.
  localparam logic [7:0] OP_ACK      = 8'h01;
  localparam logic [7:0] OP_STATUS   = 8'h02;
  localparam logic [7:0] OP_ROI_DATA = 8'h10;

  // CRC-32 (IEEE 802.3 polynomial, MSB first, no reflection) of one QW.
  function automatic logic [31:0] crc32_qw(input logic [31:0] crc, input logic [63:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 63; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = {c[30:0], 1'b0} ^ 32'h04C1_1DB7;
      else              c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  // Number of 16-pixel segments of a row of w pixels.
  function automatic logic [COORD_W:0] seg_count(input logic [31:0] w);
    logic [31:0] s;
    s = (w + 32'd15) >> 4;
    return s[COORD_W:0];
  endfunction

  // ROIP timing description set by the host (one per ROIP core).
  typedef struct packed {
    logic        defined;      // all parameters written; may be activated
    logic        immediate;
    logic        persistent;
    logic        triggered;
    etu_t        t_start;      // sampling time of the first readout
    logic [31:0] t_period;     // ETU between readouts
    logic [15:0] n_loop;       // readouts per activation, 0 = endless
  } roip_cfg_t;

  // One readout request launched by a ROIP core (the timing part; the
  // ROI shape is added from the ROI descriptor on its way to the SM).
  typedef struct packed {
    logic [ID_W-1:0] roip_id;
    logic            immediate;
    logic            persistent;
    logic            triggered;
    etu_t            sample_time;
  } roip_req_t;
endpackage
