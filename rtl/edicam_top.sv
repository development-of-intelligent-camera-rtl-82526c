// edicam_top: the EDICAM camera logic built in this design, Sensor Module
// (SM) and Image Processing and Control Unit (IPCU) side by side.
//
// SM side, clock clk_sm (100 MHz), reset rst_sm:
//   etu_timing (SM copy of the ETU system time) -> exposure_ctrl and
//   readout_ctrl; readout_ctrl -> ROI parameters and sample pulses ->
//   syncmodul -> sensor control firmware (SCFW), whose control and ROI
//   parameter ports run on its own 40 MHz clock clk_scfw (reset rst_scfw);
//   the SCFW image port stays on clk_sm; SCFW image segments, readout status
//   and row descriptors -> smcg (command generator) -> link_tx -> 10G link.
// IPCU side, clock clk_ipcu (125 MHz), reset rst_ipcu:
//   10G link -> link_rx -> ipcu_cmd_decoder -> rdp (ROI data processor)
//   -> event_processor; an IPCU copy of etu_timing feeds the event
//   processor's time input and event delays; one roip_gen per ROIP turns
//   the ROIP timing descriptions into readout requests, activated by the
//   event processor's ROIP actions or by the host.
//
// Parts that are not designed here appear as ports: the SCFW (scfw_*),
// the 10G link cores (g10tx_*, g10rx_*), the SM command decoder and
// register table (exposure parameters, start/stop, readout requests
// xi_*/ro_mode_*, clear, sample hold, acknowledge requests), the IPCU
// register table (sROI and threshold tables, event processor
// configuration), the readout command generator's row descriptor memory
// feeding the RDP X parameter interface (rdp_xp_*), the host side (ROI
// reports, SM status, acknowledge words, error counters) and the event
// processor's actions. The event processor's exposure and readout trigger
// actions come out as ports; carrying them to the SM is the job of IPCU to
// SM commands, which are not designed here. Clock domain crossing between
// the two sides exists only through the 10G link; between the SM logic and
// the SCFW it goes through syncmodul.
//
// The split into SM and IPCU and the data path follow the document;
// the port grouping is this design's.
module edicam_top #(
  parameter int XI_DEPTH  = 2048,
  parameter int ETU_DIV   = 4,
  parameter int N_SROI    = 8,
  parameter int N_ROIP    = 16,
  parameter int N_EVENTS  = 8,
  parameter int N_IN      = 4,
  parameter int N_ACT     = 4,
  parameter int N_EXT     = 8,
  parameter int N_PIN     = 4,
  parameter logic [31:0] ROIP_PRELOAD = 32'd1000
) (
  input  logic                      clk_sm,
  input  logic                      rst_sm,
  input  logic                      clk_ipcu,
  input  logic                      rst_ipcu,
  input  logic                      etu_clk_i,
  input  logic                      clk_scfw,
  input  logic                      rst_scfw,
  // ---------------- SM: command decoder / register table ----------------
  input  logic                      etu_clear_i,
  input  logic                      etu_load_i,
  input  edicam_pkg::etu_t          etu_load_val_i,
  input  edicam_pkg::exp_param_t    exp_param_i,
  input  logic                      exp_start_i,
  input  logic                      exp_stop_i,
  input  logic                      exp_trigger_i,
  input  logic                      xi_wr_i,
  input  edicam_pkg::xdesc_t        xi_data_i,
  input  logic                      xi_last_i,
  output logic                      xi_full_o,
  input  logic                      ro_mode_wr_i,
  input  edicam_pkg::ro_mode_t      ro_mode_i,
  output logic                      ro_req_full_o,
  input  logic                      ro_clear_i,
  input  logic                      ro_trigger_i,
  input  logic [31:0]               sample_hold_i,
  input  logic                      ack_req_i,
  input  logic [63:0]               ack_word_i,
  output logic                      ack_grant_o,
  output edicam_pkg::etu_t          sm_etu_o,
  output edicam_pkg::exp_state_e    exp_state_o,
  output logic                      exp_busy_o,
  output logic [edicam_pkg::ID_W-1:0] ro_cur_id_o,
  output edicam_pkg::ro_state_e     ro_state_o,
  output edicam_pkg::etu_t          last_sample_o,
  output logic                      last_sample_valid_o,
  // ---------------- SM: SCFW ----------------
  output logic                      scfw_exposure_o,
  output logic                      scfw_sample_o,
  input  logic                      scfw_busy_i,
  output logic                      scfw_par_wr_o,
  output edicam_pkg::scfw_roi_t     scfw_par_data_o,
  input  logic                      scfw_par_full_i,
  output logic                      scfw_img_rd_o,
  input  logic [191:0]              scfw_img_data_i,
  input  logic                      scfw_img_start_i,
  input  logic                      scfw_img_end_i,
  input  logic                      scfw_img_err_i,
  input  logic                      scfw_img_empty_i,
  // ---------------- SM: 10G link transmit ----------------
  output logic [63:0]               g10tx_data_o,
  output logic                      g10tx_sop_o,
  output logic                      g10tx_eop_o,
  output logic                      g10tx_wr_o,
  input  logic [7:0]                g10tx_usedw_i,
  // ---------------- IPCU: 10G link receive ----------------
  input  logic [63:0]               g10rx_data_i,
  input  logic                      g10rx_sop_i,
  input  logic                      g10rx_eop_i,
  input  logic                      g10rx_empty_i,
  output logic                      g10rx_rd_o,
  // ---------------- IPCU: register table ----------------
  input  logic                      ipcu_etu_clear_i,
  input  logic                      ipcu_etu_load_i,
  input  edicam_pkg::etu_t          ipcu_etu_load_val_i,
  input  edicam_pkg::sroi_t         sroi_table_i [N_SROI],
  input  edicam_pkg::thr_t          thr_table_i  [N_ROIP],
  input  logic                      ep_clr_i,
  input  edicam_pkg::ep_in_cfg_t    ep_in_cfg_i [N_EVENTS][N_IN],
  input  edicam_pkg::ep_ev_cfg_t    ep_ev_cfg_i [N_EVENTS],
  input  edicam_pkg::ep_act_sel_t   ep_roip_act_sel_i   [N_ROIP],
  input  edicam_pkg::ep_act_sel_t   ep_roip_deact_sel_i [N_ROIP],
  input  logic [N_ROIP-1:0]         ep_roip_ctrl_i,
  input  edicam_pkg::ep_act_sel_t   ep_roip_trig_sel_i,
  input  edicam_pkg::ep_act_sel_t   ep_exp_trig_sel_i,
  input  edicam_pkg::ep_act_sel_t   ep_irq_sel_i,
  input  edicam_pkg::ep_act_sel_t   ep_pin_sel_i [N_PIN],
  input  logic [N_PIN-1:0]          ep_pin_change_i,
  // ---------------- IPCU: readout command generator descriptor memory ----
  input  logic                      rdp_xp_wr_i,
  input  edicam_pkg::xdesc_t        rdp_xp_data_i,
  output logic                      rdp_xp_full_o,
  // ---------------- IPCU: host side ----------------
  output logic                      roi_done_o,
  output logic [edicam_pkg::ID_W-1:0] roi_id_o,
  output edicam_pkg::etu_t          roi_sample_time_o,
  output edicam_pkg::etu_t          roi_exp_time_o,
  output logic                      roi_has_img_o,
  output logic [2:0]                roi_err_o,
  output logic                      sm_status_valid_o,
  output edicam_pkg::exp_state_e    sm_exp_state_o,
  output edicam_pkg::ro_state_e     sm_ro_state_o,
  output logic [1:0]                sm_req_count_o,
  output edicam_pkg::etu_t          sm_exp_time_o,
  output logic                      ack_valid_o,
  output logic [63:0]               ack_word_o,
  output logic                      rx_request_o,
  output logic [31:0]               rx_crc_o,
  output logic [15:0]               crc_err_cnt_o,
  output logic [15:0]               len_err_cnt_o,
  output logic [15:0]               unknown_cnt_o,
  output logic                      rdp_res_valid_o,
  output edicam_pkg::rdp_result_t   rdp_res_o,
  output edicam_pkg::etu_t          ipcu_etu_o,
  // ---------------- IPCU: event processor actions ----------------
  input  logic [N_EXT-1:0]          ext_i,
  output logic [N_EVENTS-1:0]       event_state_o,
  output logic [N_ROIP-1:0]         roip_act_o,
  output logic [N_ROIP-1:0]         roip_deact_o,
  output logic                      roip_trig_o,
  output logic                      exp_trig_o,
  output logic                      irq_o,
  output logic [N_PIN-1:0]          pin_o,
  // ---------------- IPCU: ROIP cores (request scheduling) ----------------
  input  edicam_pkg::roip_cfg_t     roip_cfg_i [N_ROIP],
  input  logic [N_ROIP-1:0]         host_roip_act_i,
  input  logic [N_ROIP-1:0]         host_roip_deact_i,
  output logic [N_ROIP-1:0]         roip_active_o,
  output logic [N_ROIP-1:0]         roip_req_valid_o,
  output edicam_pkg::roip_req_t     roip_req_o [N_ROIP],
  input  logic [N_ROIP-1:0]         roip_req_ready_i,
  output logic [N_ROIP-1:0]         roip_cancelled_o,
  output logic [15:0]               roip_discarded_o [N_ROIP]
);
  import edicam_pkg::*;

  // ======================= Sensor Module =======================
  logic                sm_tick;
  etu_t                exp_time;
  logic                xo_rd, xo_last, xo_empty, st_rd, st_empty, data_sent;
  xdesc_t              xo_data;
  ro_status_t          st_data;
  logic [1:0]          req_count;
  logic                tx_req, tx_ack, tx_wr, tx_full;
  logic                sm_exposure, sm_par_wr, sm_par_full, sm_sample, sm_busy;
  edicam_pkg::scfw_roi_t sm_par_data;
  logic [23:0]         tx_size;
  logic [63:0]         tx_data;

  etu_timing #(.ETU_DIV(ETU_DIV)) u_sm_etu (
    .sys_clk_i(clk_sm), .rst_i(rst_sm), .etu_clk_i, .clear_i(etu_clear_i), .load_i(etu_load_i),
    .load_val_i(etu_load_val_i), .etu_o(sm_etu_o), .tick_o(sm_tick));

  exposure_ctrl u_exposure (
    .clk(clk_sm), .rst(rst_sm), .etu_time_i(sm_etu_o), .etu_tick_i(sm_tick),
    .start_i(exp_start_i), .stop_i(exp_stop_i), .trigger_i(exp_trigger_i), .param_i(exp_param_i),
    .exposure_o(sm_exposure), .busy_o(exp_busy_o), .state_o(exp_state_o), .exp_time_o(exp_time));

  readout_ctrl #(.XI_DEPTH(XI_DEPTH)) u_readout (
    .clk(clk_sm), .rst(rst_sm),
    .xi_wr_i, .xi_data_i, .xi_last_i, .xi_full_o,
    .mode_wr_i(ro_mode_wr_i), .mode_data_i(ro_mode_i), .req_full_o(ro_req_full_o),
    .clear_i(ro_clear_i), .trigger_i(ro_trigger_i),
    .etu_time_i(sm_etu_o), .exp_time_i(exp_time), .sample_hold_i,
    .last_sample_o, .last_sample_valid_o, .cur_id_o(ro_cur_id_o), .req_count_o(req_count),
    .state_o(ro_state_o),
    .xo_rd_i(xo_rd), .xo_data_o(xo_data), .xo_last_o(xo_last), .xo_empty_o(xo_empty),
    .st_rd_i(st_rd), .st_data_o(st_data), .st_empty_o(st_empty), .data_sent_i(data_sent),
    .par_wr_o(sm_par_wr), .par_data_o(sm_par_data), .par_full_i(sm_par_full),
    .sample_o(sm_sample), .busy_i(sm_busy));

  // control and ROI parameter interfaces into the firmware's 40 MHz domain
  syncmodul u_syncmodul (
    .clk(clk_sm), .rst(rst_sm),
    .par_wr_i(sm_par_wr), .par_data_i(sm_par_data), .par_full_o(sm_par_full),
    .sample_i(sm_sample), .exposure_i(sm_exposure), .busy_o(sm_busy),
    .sclk(clk_scfw), .srst(rst_scfw),
    .scfw_par_wr_o, .scfw_par_data_o, .scfw_par_full_i,
    .scfw_sample_o, .scfw_exposure_o, .scfw_busy_i);

  smcg u_smcg (
    .clk(clk_sm), .rst(rst_sm),
    .st_rd_o(st_rd), .st_data_i(st_data), .st_empty_i(st_empty),
    .xo_rd_o(xo_rd), .xo_data_i(xo_data), .xo_last_i(xo_last), .xo_empty_i(xo_empty),
    .img_rd_o(scfw_img_rd_o), .img_data_i(scfw_img_data_i), .img_start_i(scfw_img_start_i),
    .img_end_i(scfw_img_end_i), .img_err_i(scfw_img_err_i), .img_empty_i(scfw_img_empty_i),
    .ack_req_i, .ack_word_i, .ack_grant_o,
    .exp_state_i(exp_state_o), .ro_state_i(ro_state_o), .req_count_i(req_count),
    .exp_time_i(exp_time), .data_sent_o(data_sent),
    .tx_req_o(tx_req), .tx_size_o(tx_size), .tx_ack_i(tx_ack),
    .tx_wr_o(tx_wr), .tx_data_o(tx_data), .tx_full_i(tx_full));

  link_tx u_link_tx (
    .clk(clk_sm), .rst(rst_sm),
    .wr_i(tx_wr), .data_i(tx_data), .full_o(tx_full),
    .req_i(tx_req), .size_i(tx_size), .ack_o(tx_ack),
    .g10_data_o(g10tx_data_o), .g10_sop_o(g10tx_sop_o), .g10_eop_o(g10tx_eop_o),
    .g10_wr_o(g10tx_wr_o), .g10_usedw_i(g10tx_usedw_i));

  // ======================= IPCU =======================
  logic        ipcu_tick;
  logic [63:0] rx_data;
  logic        rx_empty, rx_rd, rx_end, rx_crc_err, rx_len_err;
  logic        mode_valid, mode_ready, img_wr, img_full;
  ro_mode_t    mode;
  logic [63:0] img_data;

  etu_timing #(.ETU_DIV(ETU_DIV)) u_ipcu_etu (
    .sys_clk_i(clk_ipcu), .rst_i(rst_ipcu), .etu_clk_i, .clear_i(ipcu_etu_clear_i),
    .load_i(ipcu_etu_load_i), .load_val_i(ipcu_etu_load_val_i), .etu_o(ipcu_etu_o),
    .tick_o(ipcu_tick));

  link_rx u_link_rx (
    .clk(clk_ipcu), .rst(rst_ipcu),
    .g10_data_i(g10rx_data_i), .g10_sop_i(g10rx_sop_i), .g10_eop_i(g10rx_eop_i),
    .g10_empty_i(g10rx_empty_i), .g10_rd_o(g10rx_rd_o),
    .data_o(rx_data), .empty_o(rx_empty), .rd_i(rx_rd),
    .request_o(rx_request_o), .cmd_end_o(rx_end), .crc_error_o(rx_crc_err),
    .length_error_o(rx_len_err), .crc_o(rx_crc_o));

  ipcu_cmd_decoder u_decoder (
    .clk(clk_ipcu), .rst(rst_ipcu),
    .rx_data_i(rx_data), .rx_empty_i(rx_empty), .rx_rd_o(rx_rd), .rx_cmd_end_i(rx_end),
    .rx_crc_error_i(rx_crc_err), .rx_length_error_i(rx_len_err),
    .mode_valid_o(mode_valid), .mode_o(mode), .mode_ready_i(mode_ready),
    .img_wr_o(img_wr), .img_data_o(img_data), .img_full_i(img_full),
    .roi_done_o, .roi_id_o, .roi_sample_time_o, .roi_exp_time_o, .roi_has_img_o, .roi_err_o,
    .status_valid_o(sm_status_valid_o), .sm_exp_state_o, .sm_ro_state_o, .sm_req_count_o,
    .sm_exp_time_o, .ack_valid_o, .ack_word_o, .crc_err_cnt_o, .len_err_cnt_o, .unknown_cnt_o);

  rdp #(.N_SROI(N_SROI), .N_ROIP(N_ROIP)) u_rdp (
    .clk(clk_ipcu), .rst(rst_ipcu),
    .mode_valid_i(mode_valid), .mode_i(mode), .mode_ready_o(mode_ready),
    .xp_wr_i(rdp_xp_wr_i), .xp_data_i(rdp_xp_data_i), .xp_full_o(rdp_xp_full_o),
    .img_wr_i(img_wr), .img_data_i(img_data), .img_full_o(img_full),
    .sroi_table_i, .thr_table_i, .res_valid_o(rdp_res_valid_o), .res_o(rdp_res_o));

  event_processor #(.N_EVENTS(N_EVENTS), .N_IN(N_IN), .N_ACT(N_ACT), .N_EXT(N_EXT),
                    .N_ROIP(N_ROIP), .N_PIN(N_PIN)) u_event (
    .clk(clk_ipcu), .rst(rst_ipcu), .clr_i(ep_clr_i), .etu_time_i(ipcu_etu_o),
    .etu_tick_i(ipcu_tick), .ext_i,
    .res_valid_i(rdp_res_valid_o), .res_id_i(rdp_res_o.roip_id),
    .res_hits_i({rdp_res_o.sum_hit, rdp_res_o.max_hit, rdp_res_o.min_hit}),
    .in_cfg_i(ep_in_cfg_i), .ev_cfg_i(ep_ev_cfg_i), .roip_act_sel_i(ep_roip_act_sel_i),
    .roip_deact_sel_i(ep_roip_deact_sel_i), .roip_ctrl_i(ep_roip_ctrl_i),
    .roip_trig_sel_i(ep_roip_trig_sel_i), .exp_trig_sel_i(ep_exp_trig_sel_i),
    .irq_sel_i(ep_irq_sel_i), .pin_sel_i(ep_pin_sel_i), .pin_change_i(ep_pin_change_i),
    .event_state_o, .roip_act_o, .roip_deact_o, .roip_trig_o, .exp_trig_o, .irq_o, .pin_o);

  // ROIP cores: activated by the event processor or the host; their
  // requests leave through ports towards the command requesters
  for (genvar r = 0; r < N_ROIP; r++) begin : g_roip
    roip_gen #(.T_PRELOAD(ROIP_PRELOAD)) u_roip (
      .clk(clk_ipcu), .rst(rst_ipcu), .roip_id_i(ID_W'(r)), .cfg_i(roip_cfg_i[r]),
      .etu_time_i(ipcu_etu_o),
      .activate_i(roip_act_o[r] || host_roip_act_i[r]),
      .deactivate_i(roip_deact_o[r] || host_roip_deact_i[r]),
      .active_o(roip_active_o[r]), .req_valid_o(roip_req_valid_o[r]), .req_o(roip_req_o[r]),
      .req_ready_i(roip_req_ready_i[r]), .discarded_o(roip_discarded_o[r]), .cancelled_o(roip_cancelled_o[r]));
  end
endmodule
