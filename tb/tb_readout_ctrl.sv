// tb_readout_ctrl: self-checking test of the readout controller against the
// SCFW model. The testbench plays the IPCU (writes requests) and the command
// generator (reads status and Xo, pulses data_sent). ETU time advances by
// one every clock. Cases: normal rectangular, arbitrary shape, reuse of the
// last sample, past non-persistent (timeout), past persistent, triggered,
// clear while armed, immediate, request buffer full.
module tb_readout_ctrl;
  import edicam_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic xi_wr, xi_last, xi_full, mode_wr, req_full, clear, trigger;
  xdesc_t xi_data; ro_mode_t mode_data;
  etu_t etu = 0, exp_time;
  etu_t last_sample; logic last_valid; logic [ID_W-1:0] cur_id; logic [1:0] req_count;
  ro_state_e state;
  logic xo_rd, xo_last, xo_empty, st_rd, st_empty, data_sent;
  xdesc_t xo_data; ro_status_t st_data;
  logic par_wr, par_full, sample, busy;
  scfw_roi_t par_data;
  logic img_rd; logic [191:0] img_data; logic img_start, img_end, img_err, img_empty;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) etu <= etu + 1;
  assign exp_time = 64'd777;

  readout_ctrl #(.XI_DEPTH(64)) dut (
    .clk, .rst, .xi_wr_i(xi_wr), .xi_data_i(xi_data), .xi_last_i(xi_last), .xi_full_o(xi_full),
    .mode_wr_i(mode_wr), .mode_data_i(mode_data), .req_full_o(req_full),
    .clear_i(clear), .trigger_i(trigger), .etu_time_i(etu), .exp_time_i(exp_time),
    .sample_hold_i(32'd200), .last_sample_o(last_sample), .last_sample_valid_o(last_valid),
    .cur_id_o(cur_id), .req_count_o(req_count), .state_o(state),
    .xo_rd_i(xo_rd), .xo_data_o(xo_data), .xo_last_o(xo_last), .xo_empty_o(xo_empty),
    .st_rd_i(st_rd), .st_data_o(st_data), .st_empty_o(st_empty), .data_sent_i(data_sent),
    .par_wr_o(par_wr), .par_data_o(par_data), .par_full_i(par_full),
    .sample_o(sample), .busy_i(busy));

  scfw_model u_scfw (.clk, .clk_img(clk), .rst, .par_wr, .par_data, .par_full, .sample_i(sample), .exposure_i(1'b0),
    .busy_o(busy), .img_rd, .img_data, .img_start, .img_end, .img_err, .img_empty);
  assign img_rd = !img_empty;   // drain image data

  // Record every sample pulse and every parameter word.
  etu_t sample_times[$];
  scfw_roi_t pars[$];
  always @(posedge clk) begin
    if (sample && !rst) sample_times.push_back(etu);
    if (par_wr && !par_full && !rst) pars.push_back(par_data);
  end

  int armed_seen = 0, readout_seen = 0;
  always @(posedge clk) begin
    if (state == RO_ARMED) armed_seen++;
    if (state == RO_READOUT) readout_seen++;
  end

  task automatic send(input ro_mode_t m, input xdesc_t rows[$]);
    foreach (rows[i]) begin
      @(negedge clk); xi_wr = 1; xi_data = rows[i]; xi_last = (i == rows.size()-1);
    end
    @(negedge clk); xi_wr = 0; mode_wr = 1; mode_data = m;
    @(negedge clk); mode_wr = 0;
  endtask

  // Act as command generator for one request: wait for status, read Xo.
  task automatic collect(output ro_status_t s, input xdesc_t rows[$]);
    int guard = 0;
    while (st_empty && guard < 2000) begin @(negedge clk); guard++; end
    s = st_data;
    st_rd = 1; @(negedge clk); st_rd = 0;
    foreach (rows[i]) begin
      check(!xo_empty && xo_data == rows[i] && xo_last == (i == rows.size()-1), "Xo descriptor read back");
      xo_rd = 1; @(negedge clk); xo_rd = 0;
    end
    data_sent = 1; @(negedge clk); data_sent = 0;
  endtask

  function automatic ro_mode_t mk(input logic imm, pers, trig, arb, input int y0, nrows, input etu_t t, input int id);
    ro_mode_t m;
    m = '0; m.immediate = imm; m.persistent = pers; m.triggered = trig; m.arbitrary = arb;
    m.y0 = 11'(y0); m.nrows = 12'(nrows); m.sample_time = t; m.roip_id = 8'(id);
    return m;
  endfunction

  function automatic xdesc_t xd(input int x0, input int w);
    xdesc_t d; d.x0 = 32'(x0); d.width = 32'(w); return d;
  endfunction

  initial begin
    ro_status_t s; ro_mode_t m; xdesc_t rows[$]; etu_t t; int ns, np;
    xi_wr = 0; mode_wr = 0; clear = 0; trigger = 0; xo_rd = 0; st_rd = 0; data_sent = 0;
    xi_data = '0; xi_last = 0; mode_data = '0;
    repeat (4) @(negedge clk); rst = 0; @(negedge clk);

    // 1. normal rectangular request (x=0, 32 wide, 4 rows at y=10)
    t = etu + 40; rows = '{xd(0, 32)};
    send(mk(0,0,0,0,10,4,t,5), rows);
    repeat (2) @(negedge clk);
    check(state == RO_ARMED, "ARMED while waiting for sampling time");
    check(cur_id == 8'd5, "current ROI id");
    collect(s, rows);
    check(sample_times.size() == 1 && sample_times[0] == t, "sample at requested ETU time");
    check(pars.size() == 1 && pars[0].x == 0 && pars[0].y == 10 && pars[0].w == 32 && pars[0].h == 4
          && pars[0].first && pars[0].last, "rectangular SCFW ROI");
    check(s.sample_time == t && s.n_seg == 8 && !s.stopped && !s.timeout && s.mode.roip_id == 5
          && s.exposure_time == 777, "status of rectangular readout");

    // 2. arbitrary shape, 3 rows, same sampling time -> reuses the sample
    rows = '{xd(4, 20), xd(8, 40), xd(0, 16)};
    send(mk(0,0,0,1,100,3,t,6), rows);
    collect(s, rows);
    check(sample_times.size() == 1, "no new sample when sampling time equals the last sample");
    check(pars.size() == 4 && pars[1].y == 100 && pars[2].y == 101 && pars[3].y == 102
          && pars[1].first && !pars[1].last && !pars[2].first && pars[3].last
          && pars[2].x == 8 && pars[2].w == 40 && pars[3].h == 1, "arbitrary rows as 1-row rectangles");
    check(s.n_seg == 2 + 3 + 1 && s.sample_time == t, "status of arbitrary readout");

    // 3. normal, non-persistent, sampling time already passed -> timeout
    np = pars.size(); ns = sample_times.size();
    rows = '{xd(0, 16)};
    send(mk(0,0,0,0,0,1,etu - 5,7), rows);
    collect(s, rows);
    check(s.timeout && !s.stopped && s.n_seg == 0, "timeout flag on passed sampling time");
    check(pars.size() == np && sample_times.size() == ns, "dropped request reaches SCFW not at all");

    // 4. persistent with passed time -> sampled at once
    send(mk(0,1,0,0,0,1,etu - 5,8), rows);
    collect(s, rows);
    check(!s.timeout && sample_times.size() == ns + 1 && pars.size() == np + 1, "persistent request read anyway");

    // 5. triggered: sampled on trigger, before the sampling time
    t = etu + 500;
    send(mk(0,0,1,0,0,1,t,9), rows);
    repeat (20) @(negedge clk);
    check(sample_times.size() == ns + 1, "triggered request waits for trigger");
    trigger = 1; @(negedge clk); trigger = 0;
    collect(s, rows);
    check(sample_times.size() == ns + 2 && s.sample_time < t && !s.timeout, "sampled on trigger");

    // 6. clear while armed
    send(mk(0,0,0,0,0,1,etu + 1000,10), rows);
    repeat (5) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    collect(s, rows);
    check(s.stopped && !s.timeout && sample_times.size() == ns + 2, "clear cancels armed request");

    // 7. immediate
    send(mk(1,0,0,0,0,1,etu + 100000,11), rows);
    collect(s, rows);
    check(sample_times.size() == ns + 3 && s.sample_time < etu, "immediate request sampled at once");

    // 8. request buffer: two requests fill it, data_sent frees a slot
    t = etu + 300;
    send(mk(0,0,0,0,0,1,t,12), rows);
    send(mk(0,0,0,0,0,1,t,13), rows);
    check(req_full && req_count == 2, "request buffer full after two requests");
    collect(s, rows);
    check(!req_full, "data_sent frees a request slot");
    collect(s, rows);
    check(s.mode.roip_id == 13 && req_count == 0, "second buffered request executed");

    check(armed_seen > 0 && readout_seen > 0, "ARMED and READOUT states visited");
    check(u_scfw.sample_while_busy == 0, "never sampled while SCFW busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
