// tb_edicam_top: end-to-end test of the whole camera logic at its default
// parameters. The Sensor Module side runs at 100 MHz, the IPCU side at
// 125 MHz, the ETU source at 40 MHz (100 ns per ETU). The testbench plays
// the parts that are not designed as logic: a behavioural sensor firmware
// (scfw_model, control side on the 40 MHz clock, image side on the SM
// clock), a 10G link (a FIFO of QWs with sop/eop from the SM
// transmitter to the IPCU receiver, with a used-words count, a hold switch
// to make it back up, and a one-shot bit flip to corrupt one packet), the
// SM command decoder (readout requests, exposure parameters), the IPCU
// register table, the row descriptor memory feeding the ROI data
// processor and the command requesters, which accept every ROIP request. The event processor's readout trigger action is carried back
// to the SM readout trigger, as an IPCU to SM command would.
//
// Scenario and counted mechanisms (each must happen at least once):
//   exposure sequence of 2 exposures, with STATUS commands mirroring the
//   SM state on the IPCU; an immediate rectangular ROI; a triggered ROI
//   whose trigger comes from the event processor reacting to the RDP
//   result of the first ROI; an arbitrary ROI; a request sampled at an
//   exact ETU time (latency check: sampled at that time); a request in the
//   past that times out (no image, timeout bit); a full request FIFO; a
//   link stall (transmitter held back by the link's fill level); a CRC
//   error detected on the IPCU; an acknowledge command; interrupts; three
//   timed requests of a normal ROIP core (each launched 1000 ETU before
//   its sampling time) and a late immediate ROIP run that is cancelled.
// Every RDP result (min, max, sum over the ROI) is compared with values
// computed here from the sensor model's pixel formula.
module tb_edicam_top;
  import edicam_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = 8, NR = 16, NE = 8, NI = 4, NX = 8, NP = 4;

  logic clk_sm = 0, clk_ipcu = 0, etu_clk = 0, rst_sm = 1, rst_ipcu = 1;
  always #5    clk_sm = !clk_sm;
  always #4    clk_ipcu = !clk_ipcu;
  always #12.5 etu_clk = !etu_clk;
  // the firmware's 40 MHz side (here the same oscillator as the ETU
  // source) leaves reset on its own clock
  logic rst_scfw = 1;
  always @(posedge etu_clk) rst_scfw <= rst_sm;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- DUT signals ----------------
  exp_param_t exp_param = '0;
  logic exp_start = 0, exp_stop = 0, exp_trigger = 0;
  logic xi_wr = 0, xi_last = 0, xi_full, mode_wr = 0, req_full, ro_clear = 0, ro_trigger = 0;
  xdesc_t xi_data = '0;
  ro_mode_t mode = '0;
  logic ack_req = 0, ack_grant;
  logic [63:0] ack_word = '0;
  etu_t sm_etu, ipcu_etu, last_sample, sm_exp_time, roi_st, roi_et;
  exp_state_e exp_state, sm_exp_state;
  ro_state_e ro_state, sm_ro_state;
  logic exp_busy, last_sample_valid;
  logic [ID_W-1:0] cur_id, roi_id;
  logic scfw_exposure, scfw_sample, scfw_busy, par_wr, par_full, img_rd, img_start, img_end, img_err, img_empty;
  scfw_roi_t par_data;
  logic [191:0] img_data;
  logic [63:0] tx_data, rx_data;
  logic tx_sop, tx_eop, tx_wr, rx_sop, rx_eop, rx_empty = 1, rx_rd;
  logic [7:0] tx_usedw = 0;
  sroi_t sroi [NS];
  thr_t thr [NR];
  ep_in_cfg_t in_cfg [NE][NI];
  ep_ev_cfg_t ev_cfg [NE];
  ep_act_sel_t ra_sel [NR], rd_sel [NR], pin_sel [NP];
  ep_act_sel_t rt_sel, et_sel, irq_sel;
  logic xp_wr = 0, xp_full;
  xdesc_t xp_data = '0;
  logic roi_done, roi_has_img, st_valid, ack_valid, res_valid, rx_request;
  logic [2:0] roi_err;
  logic [1:0] sm_req_count;
  logic [63:0] ack_word_rx;
  logic [31:0] rx_crc;
  logic [15:0] crc_cnt, len_cnt, unk_cnt;
  rdp_result_t res;
  logic [NE-1:0] evs;
  logic [NR-1:0] ract, rdeact;
  logic rtrig, etrig, irq;
  logic [NP-1:0] pins;
  roip_cfg_t roip_cfg [NR];
  logic [NR-1:0] h_act = '0, h_deact = '0, r_active, r_valid, r_canc;
  roip_req_t r_req [NR];
  logic [15:0] r_disc [NR];

  edicam_top dut (
    .clk_sm, .rst_sm, .clk_ipcu, .rst_ipcu, .etu_clk_i(etu_clk), .clk_scfw(etu_clk), .rst_scfw(rst_scfw),
    .etu_clear_i(1'b0), .etu_load_i(1'b0), .etu_load_val_i('0),
    .exp_param_i(exp_param), .exp_start_i(exp_start), .exp_stop_i(exp_stop), .exp_trigger_i(exp_trigger),
    .xi_wr_i(xi_wr), .xi_data_i(xi_data), .xi_last_i(xi_last), .xi_full_o(xi_full),
    .ro_mode_wr_i(mode_wr), .ro_mode_i(mode), .ro_req_full_o(req_full),
    .ro_clear_i(ro_clear), .ro_trigger_i(ro_trigger), .sample_hold_i(32'd1000),
    .ack_req_i(ack_req), .ack_word_i(ack_word), .ack_grant_o(ack_grant),
    .sm_etu_o(sm_etu), .exp_state_o(exp_state), .exp_busy_o(exp_busy), .ro_cur_id_o(cur_id),
    .ro_state_o(ro_state), .last_sample_o(last_sample), .last_sample_valid_o(last_sample_valid),
    .scfw_exposure_o(scfw_exposure), .scfw_sample_o(scfw_sample), .scfw_busy_i(scfw_busy),
    .scfw_par_wr_o(par_wr), .scfw_par_data_o(par_data), .scfw_par_full_i(par_full),
    .scfw_img_rd_o(img_rd), .scfw_img_data_i(img_data), .scfw_img_start_i(img_start),
    .scfw_img_end_i(img_end), .scfw_img_err_i(img_err), .scfw_img_empty_i(img_empty),
    .g10tx_data_o(tx_data), .g10tx_sop_o(tx_sop), .g10tx_eop_o(tx_eop), .g10tx_wr_o(tx_wr),
    .g10tx_usedw_i(tx_usedw),
    .g10rx_data_i(rx_data), .g10rx_sop_i(rx_sop), .g10rx_eop_i(rx_eop), .g10rx_empty_i(rx_empty),
    .g10rx_rd_o(rx_rd),
    .ipcu_etu_clear_i(1'b0), .ipcu_etu_load_i(1'b0), .ipcu_etu_load_val_i('0),
    .sroi_table_i(sroi), .thr_table_i(thr), .ep_clr_i(1'b0), .ep_in_cfg_i(in_cfg), .ep_ev_cfg_i(ev_cfg),
    .ep_roip_act_sel_i(ra_sel), .ep_roip_deact_sel_i(rd_sel), .ep_roip_ctrl_i('0),
    .ep_roip_trig_sel_i(rt_sel), .ep_exp_trig_sel_i(et_sel), .ep_irq_sel_i(irq_sel),
    .ep_pin_sel_i(pin_sel), .ep_pin_change_i('0),
    .rdp_xp_wr_i(xp_wr), .rdp_xp_data_i(xp_data), .rdp_xp_full_o(xp_full),
    .roi_done_o(roi_done), .roi_id_o(roi_id), .roi_sample_time_o(roi_st), .roi_exp_time_o(roi_et),
    .roi_has_img_o(roi_has_img), .roi_err_o(roi_err),
    .sm_status_valid_o(st_valid), .sm_exp_state_o(sm_exp_state), .sm_ro_state_o(sm_ro_state),
    .sm_req_count_o(sm_req_count), .sm_exp_time_o(sm_exp_time),
    .ack_valid_o(ack_valid), .ack_word_o(ack_word_rx), .rx_request_o(rx_request), .rx_crc_o(rx_crc),
    .crc_err_cnt_o(crc_cnt), .len_err_cnt_o(len_cnt), .unknown_cnt_o(unk_cnt),
    .rdp_res_valid_o(res_valid), .rdp_res_o(res), .ipcu_etu_o(ipcu_etu),
    .ext_i('0), .event_state_o(evs), .roip_act_o(ract), .roip_deact_o(rdeact),
    .roip_trig_o(rtrig), .exp_trig_o(etrig), .irq_o(irq), .pin_o(pins),
    .roip_cfg_i(roip_cfg), .host_roip_act_i(h_act), .host_roip_deact_i(h_deact),
    .roip_active_o(r_active), .roip_req_valid_o(r_valid), .roip_req_o(r_req),
    .roip_req_ready_i({NR{1'b1}}), .roip_cancelled_o(r_canc), .roip_discarded_o(r_disc));

  // ---------------- sensor firmware ----------------
  scfw_model #(.DL(4), .PAR_DEPTH(4), .TWO_CLK(1'b1)) u_scfw (
    .clk(etu_clk), .clk_img(clk_sm), .rst(rst_scfw), .par_wr(par_wr), .par_data(par_data), .par_full(par_full),
    .sample_i(scfw_sample), .exposure_i(scfw_exposure), .busy_o(scfw_busy),
    .img_rd(img_rd), .img_data(img_data), .img_start(img_start), .img_end(img_end),
    .img_err(img_err), .img_empty(img_empty));

  // ---------------- 10G link ----------------
  logic [65:0] link_q[$];
  bit link_hold = 0, corrupt_next_status = 0;
  int stall_cycles = 0, max_usedw = 0, link_over = 0;
  always @(posedge clk_sm) if (tx_wr && !rst_sm) begin
    logic [63:0] d;
    d = tx_data;
    // flip one bit in the second QW of the next STATUS command
    if (corrupt_next_status && !tx_sop && link_q.size() > 0 && link_q[$][65] &&
        link_q[$][63:56] == OP_STATUS) begin
      d[0] = !d[0]; corrupt_next_status = 0;
    end
    if (link_q.size() >= 256) link_over++;
    link_q.push_back({tx_sop, tx_eop, d});
  end
  always @(negedge clk_sm) begin
    tx_usedw = (link_q.size() > 255) ? 8'd255 : 8'(link_q.size());
    if (int'(tx_usedw) > max_usedw) max_usedw = int'(tx_usedw);
  end
  // the transmitter is stalled when the link is above its high mark and
  // nothing is written
  always @(posedge clk_sm) if (!rst_sm && tx_usedw >= 8'd240 && !tx_wr) stall_cycles++;
  always @(negedge clk_ipcu) begin
    rx_empty = link_hold || link_q.size() == 0;
    {rx_sop, rx_eop, rx_data} = (link_q.size() > 0) ? link_q[0] : 66'd0;
  end
  always @(posedge clk_ipcu) if (rx_rd && !rx_empty && !rst_ipcu) void'(link_q.pop_front());

  // ---------------- event processor actions back to the SM ----------------
  // readout trigger: stretched to two SM cycles
  int trig_stretch = 0;
  always @(posedge clk_ipcu) if (rtrig && !rst_ipcu) trig_stretch = 3;
  always @(posedge clk_sm) begin
    ro_trigger <= trig_stretch > 0;
    if (trig_stretch > 0) trig_stretch--;
  end

  // ---------------- ROIP requests (the command requesters accept at once) ----
  roip_req_t roip_log[$]; etu_t roip_launch[$]; int n_roip_cancel = 0;
  always @(posedge clk_ipcu) if (!rst_ipcu) begin
    for (int r = 0; r < NR; r++) begin
      if (r_valid[r]) begin roip_log.push_back(r_req[r]); roip_launch.push_back(ipcu_etu); end
      if (r_canc[r]) n_roip_cancel++;
    end
  end

  // ---------------- counters ----------------
  int n_status = 0, n_ack = 0, n_irq = 0, n_rtrig = 0, n_roi = 0, n_roi_img = 0, n_timeout = 0;
  int n_req_full = 0, n_expo = 0, n_exp_run_seen = 0;
  logic expo_q = 0;
  always @(posedge clk_ipcu) if (!rst_ipcu) begin
    n_status += int'(st_valid); n_ack += int'(ack_valid); n_irq += int'(irq); n_rtrig += int'(rtrig);
    if (st_valid && sm_exp_state == EXP_RUN) n_exp_run_seen++;
    if (roi_done) begin
      n_roi++;
      if (roi_has_img) n_roi_img++;
      if (roi_err[1]) n_timeout++;
    end
  end
  always @(posedge clk_sm) if (!rst_sm) begin
    expo_q <= scfw_exposure;
    if (scfw_exposure && !expo_q) n_expo++;
    if (req_full) n_req_full++;
  end

  // ---------------- expected RDP results ----------------
  rdp_result_t exp_q[$];
  int n_res_ok = 0;
  function automatic logic [11:0] pix(input int col, input int row);
    return 12'((col * 3 + row * 5 + 1) & 12'hFFF);
  endfunction
  always @(posedge clk_ipcu) if (res_valid && !rst_ipcu) begin
    if (exp_q.size() == 0) check(0, "unexpected RDP result");
    else begin
      rdp_result_t e;
      e = exp_q.pop_front();
      check(res.roip_id == e.roip_id && res.min == e.min && res.max == e.max && res.sum == e.sum,
            $sformatf("RDP result id %0d: min %0d/%0d max %0d/%0d sum %0d/%0d", res.roip_id,
                      res.min, e.min, res.max, e.max, res.sum, e.sum));
      n_res_ok++;
    end
  end

  // ---------------- row descriptors to the RDP ----------------
  xdesc_t xp_pending[$];
  always @(posedge clk_ipcu) begin
    if (xp_pending.size() > 0 && !xp_full && !xp_wr) begin
      xp_wr <= 1; xp_data <= xp_pending.pop_front();
    end else xp_wr <= 0;
  end

  // ---------------- readout requests ----------------
  // rows y0..y0+nrows-1; rectangular: one descriptor; arbitrary: one per row
  task automatic request(input int id, input bit imm, input bit trig, input bit arb, input bit pers,
                         input int y0, input int nrows, input int xs[], input int ws[],
                         input etu_t t, input bit expect_img);
    int nd;
    rdp_result_t e;
    nd = arb ? nrows : 1;
    @(posedge clk_sm);
    for (int k = 0; k < nd; k++) begin
      xi_wr <= 1; xi_data <= '{width: 32'(ws[k]), x0: 32'(xs[k])}; xi_last <= (k == nd - 1);
      @(posedge clk_sm);
    end
    xi_wr <= 0; xi_last <= 0;
    while (req_full) @(posedge clk_sm);
    mode <= '{roip_id: 8'(id), immediate: imm, persistent: pers, triggered: trig, arbitrary: arb,
              y0: 11'(y0), nrows: 12'(nrows), sample_time: t};
    mode_wr <= 1;
    @(posedge clk_sm);
    mode_wr <= 0;
    if (expect_img) begin
      e = '0; e.roip_id = 8'(id); e.min = 12'hFFF; e.max = 0; e.sum = 0;
      for (int r = 0; r < nrows; r++) begin
        int kx;
        kx = arb ? r : 0;
        for (int c = xs[kx]; c < xs[kx] + ws[kx]; c++) begin
          logic [11:0] p;
          p = pix(c, y0 + r);
          if (p < e.min) e.min = p;
          if (p > e.max) e.max = p;
          e.sum += 36'(p);
        end
      end
      exp_q.push_back(e);
      // row descriptor memory of the IPCU readout command generator
      for (int k = 0; k < nd; k++) xp_pending.push_back('{width: 32'(ws[k]), x0: 32'(xs[k])});
    end
    repeat (10) @(posedge clk_sm);
  endtask

  task automatic wait_roi(input int n, input int max_cycles);
    int c = 0;
    while (n_roi < n && c < max_cycles) begin @(posedge clk_ipcu); c++; end
    check(n_roi >= n, $sformatf("ROI %0d reported (waited %0d cycles)", n, c));
  endtask

  function automatic ep_act_sel_t sel(input int e, input int b);
    sel.oe = 1'b1; sel.evt = 4'(e); sel.bit_sel = 3'(b);
  endfunction

  etu_t t_exact;
  int xs1[] = '{0}, ws1[] = '{32};
  int xs2[] = '{5, 40, 100}, ws2[] = '{20, 7, 33};
  int xs3[] = '{64}, ws3[] = '{48};
  int xs4[] = '{10}, ws4[] = '{16};
  int xs5[] = '{16}, ws5[] = '{64};
  int xs6[] = '{1280 - 40}, ws6[] = '{40};

  initial begin
    int ok; etu_t roip_t5;
    foreach (roip_cfg[i]) roip_cfg[i] = '0;
    foreach (sroi[i]) sroi[i] = '0;                  // no sROI: whole image
    foreach (thr[i]) begin thr[i].min_th = 12'hFFF; thr[i].max_th = 12'hFFF; thr[i].sum_th = '1; end
    thr[1].max_th = 12'd0;                           // ROIP 1: max above 0 always
    thr[3].max_th = 12'd0;                           // ROIP 3: max above 0 always
    foreach (in_cfg[e, i]) begin in_cfg[e][i] = '0; in_cfg[e][i].type_sel = IN_HOST; end
    foreach (ev_cfg[e]) begin ev_cfg[e] = '0; ev_cfg[e].in_inv = 8'hFE; end
    // event 0: RDP maximum of ROIP 1 -> readout trigger
    in_cfg[0][0].type_sel = IN_IMAGE; in_cfg[0][0].ref_id = 8'd1; in_cfg[0][0].img_sel = IMG_MAX;
    // event 1: RDP maximum of ROIP 3 -> interrupt
    in_cfg[1][0].type_sel = IN_IMAGE; in_cfg[1][0].ref_id = 8'd3; in_cfg[1][0].img_sel = IMG_MAX;
    foreach (ra_sel[r]) begin ra_sel[r] = '0; rd_sel[r] = '0; end
    foreach (pin_sel[p]) pin_sel[p] = '0;
    rt_sel = sel(0, 0); irq_sel = sel(1, 0); et_sel = '0;

    repeat (10) @(posedge clk_sm);
    rst_sm <= 0; rst_ipcu <= 0;
    repeat (20) @(posedge clk_sm);

    // 0. ROIP cores: ROIP 5 normal (3 readouts, 200 ETU apart) and ROIP 6
    //    immediate, not persistent, started too late (cancelled)
    roip_t5 = ipcu_etu + 1500;
    roip_cfg[5] <= '{defined: 1'b1, immediate: 1'b0, persistent: 1'b0, triggered: 1'b0,
                     t_start: roip_t5, t_period: 32'd200, n_loop: 16'd3};
    roip_cfg[6] <= '{defined: 1'b1, immediate: 1'b1, persistent: 1'b0, triggered: 1'b0,
                     t_start: 64'd1, t_period: 32'd10, n_loop: 16'd4};
    @(posedge clk_ipcu); h_act[5] <= 1; h_act[6] <= 1;
    @(posedge clk_ipcu); h_act <= '0;

    // 1. exposure sequence: 2 exposures of 20 ETU every 50 ETU
    exp_param <= '{t0: '0, t_exposure: 32'd20, t_repetition: 32'd50, n_loop: 16'd2,
                   triggered: 1'b0, immediate: 1'b1};
    exp_start <= 1; @(posedge clk_sm); exp_start <= 0;

    // 2. immediate rectangular ROI (ROIP 1), its result triggers ROIP 3
    request(1, 1, 0, 0, 0, 10, 4, xs1, ws1, '0, 1);
    request(3, 0, 1, 0, 1, 100, 2, xs3, ws3, '0, 1);
    wait_roi(2, 40000);
    repeat (20) @(posedge clk_ipcu);
    check(n_rtrig >= 1, "event processor issued the readout trigger");
    check(n_irq >= 1, "interrupt for ROIP 3");

    // 3. arbitrary ROI (ROIP 2), 3 rows of different widths
    request(2, 1, 0, 1, 0, 500, 3, xs2, ws2, '0, 1);
    wait_roi(3, 40000);

    // 4. sample at an exact ETU time
    t_exact = sm_etu + 64'd40;
    request(4, 0, 0, 0, 0, 20, 1, xs4, ws4, t_exact, 1);
    wait_roi(4, 40000);
    check(last_sample == t_exact, $sformatf("sampled at ETU %0d, asked for %0d", last_sample, t_exact));
    check(roi_st == t_exact, "sample time reported to the IPCU");

    // 5. request in the past, not persistent: timeout, no image
    request(5, 0, 0, 0, 0, 0, 1, xs4, ws4, sm_etu - 64'd20, 0);
    wait_roi(5, 40000);
    check(!roi_has_img && roi_err[1], "past request timed out without image");

    // 6. link stall: hold the link while a 64 x 64 ROI is sent; CRC error
    //    on the next STATUS command
    corrupt_next_status = 1;
    link_hold = 1;
    request(6, 1, 0, 0, 0, 200, 64, xs5, ws5, '0, 1);
    repeat (3000) @(posedge clk_sm);
    link_hold = 0;
    wait_roi(6, 100000);

    // 7. two requests back to back: request FIFO full
    request(7, 1, 0, 0, 0, 1000, 24, xs6, ws6, '0, 1);
    request(8, 1, 0, 0, 0, 1023, 1, xs1, ws1, '0, 1);
    wait_roi(8, 100000);

    // 8. acknowledge
    ack_word <= 64'hA5A5_0000_1234_5678; ack_req <= 1;
    do @(posedge clk_sm); while (!ack_grant);
    ack_req <= 0;
    repeat (200) @(posedge clk_ipcu);
    check(n_ack == 1 && ack_word_rx == 64'hA5A5_0000_1234_5678, "acknowledge word received");

    repeat (500) @(posedge clk_ipcu);
    check(exp_q.size() == 0, $sformatf("%0d RDP results missing", exp_q.size()));
    check(sm_exp_state == exp_state && sm_ro_state == ro_state, "IPCU copy of SM state up to date");
    check(link_over == 0, "link FIFO never over 256 words");
    check(len_cnt == 0 && unk_cnt == 0, "no length errors or unknown commands");

    // ROIP cores
    while (r_active[5]) @(posedge clk_ipcu);
    repeat (2) @(posedge clk_ipcu);
    ok = (roip_log.size() == 3);
    foreach (roip_log[i])
      if (roip_log[i].roip_id != 8'd5 || roip_log[i].sample_time != roip_t5 + 200*i ||
          roip_launch[i] - (roip_t5 + 200*i - 1000) > 1) ok = 0;
    check(ok, $sformatf("ROIP 5: %0d requests, each launched 1000 ETU before its sampling time", roip_log.size()));
    check(n_roip_cancel == 1 && !r_active[6], "late immediate ROIP 6 cancelled");

    // mechanism counts
    $display("mechanisms: exposures=%0d status=%0d exp_run_status=%0d roi=%0d roi_img=%0d timeout=%0d",
             n_expo, n_status, n_exp_run_seen, n_roi, n_roi_img, n_timeout);
    $display("            req_full=%0d stall=%0d (max usedw %0d) crc_err=%0d ack=%0d rtrig=%0d irq=%0d results=%0d samples=%0d",
             n_req_full, stall_cycles, max_usedw, crc_cnt, n_ack, n_rtrig, n_irq, n_res_ok, u_scfw.samples);
    $display("            roip_requests=%0d roip_cancelled=%0d", roip_log.size(), n_roip_cancel);
    check(n_expo == 2, "exposure sequence: 2 exposures");
    check(n_exp_run_seen >= 1, "STATUS command showed a running exposure");
    check(n_status >= 4, "STATUS commands");
    check(n_roi == 8 && n_roi_img == 7, "ROI reports with and without image");
    check(n_timeout == 1, "timeout");
    check(n_req_full >= 1, "request FIFO full");
    check(stall_cycles >= 1, "link stall");
    check(crc_cnt == 16'd1, "CRC error detected");
    check(n_rtrig >= 1 && n_irq >= 1, "event actions");
    check(n_res_ok == 7, "RDP results");
    check(u_scfw.sample_while_busy == 0, "no sample while SCFW busy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
