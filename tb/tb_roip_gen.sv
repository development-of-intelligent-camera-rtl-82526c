// tb_roip_gen: self-checking test of one ROIP request scheduler with a
// preload of 20 ETU and an ETU time that advances every clock.
//
// Cases: normal timed run (sampling times t_start + k*T_period, each
// request offered 19 ETU before its sampling time, i.e. one cycle after
// the preload point); late activation of a normal non-persistent ROIP
// (late requests discarded); the same persistent (all launched); immediate
// non-persistent and late (whole run cancelled); immediate in time (all
// requests back to back from t_start - preload, under random
// back-pressure); an endless run stopped by deactivation; activation of an
// undefined ROIP. A monitor checks that an offered request holds still
// until it is accepted.
module tb_roip_gen;
  import edicam_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  etu_t etu = 0;
  always @(posedge clk) etu <= etu + 1;

  roip_cfg_t cfg = '0;
  logic act = 0, deact = 0, ready = 1, active, valid, cancelled;
  roip_req_t req;
  logic [15:0] discarded;

  roip_gen #(.T_PRELOAD(32'd20)) dut (.clk, .rst, .roip_id_i(8'd9), .cfg_i(cfg), .etu_time_i(etu),
    .activate_i(act), .deactivate_i(deact), .active_o(active), .req_valid_o(valid), .req_o(req),
    .req_ready_i(ready), .discarded_o(discarded), .cancelled_o(cancelled));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // accepted requests and the ETU time at which each was first offered
  etu_t samp[$], offered_at[$];
  logic valid_q = 0; roip_req_t req_q = '0; int unstable = 0, n_cancel = 0;
  always @(posedge clk) if (!rst) begin
    if (valid && !valid_q) offered_at.push_back(etu);
    if (valid && valid_q && req != req_q) unstable++;
    if (valid && ready) begin samp.push_back(req.sample_time); valid_q <= 1'b0; end
    else valid_q <= valid;
    req_q <= req;
    if (cancelled) n_cancel++;
  end

  task automatic start(input etu_t t0, input int per, input int n, input bit imm, input bit pers);
    @(negedge clk);
    cfg = '{defined: 1'b1, immediate: imm, persistent: pers, triggered: 1'b0,
            t_start: t0, t_period: 32'(per), n_loop: 16'(n)};
    samp.delete(); offered_at.delete();
    act = 1; @(negedge clk); act = 0;
  endtask

  task automatic wait_idle();
    int g = 0;
    while (active && g < 3000) begin @(negedge clk); g++; end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    etu_t t0; int ok;
    repeat (3) @(negedge clk); rst = 0; repeat (2) @(negedge clk);

    // 1. normal timed run
    t0 = etu + 100;
    start(t0, 50, 3, 0, 0);
    wait_idle();
    check(samp.size() == 3 && samp[0] == t0 && samp[1] == t0 + 50 && samp[2] == t0 + 100,
          "normal run: three requests at t_start + k*T_period");
    ok = (offered_at.size() == 3);
    foreach (offered_at[i]) if (offered_at[i] != t0 + 50*i - 19) ok = 0;
    check(ok, "normal run: each request offered 19 ETU before its sampling time");
    check(!active, "run ends after N_loop requests");

    // 2. late activation, not persistent: the first two are discarded
    t0 = etu - 60;
    start(t0, 50, 4, 0, 0);
    wait_idle();
    check(samp.size() == 2 && samp[0] == t0 + 100 && samp[1] == t0 + 150,
          "late normal run: only requests still in the future launched");
    check(discarded == 16'd2, "late normal run: two requests discarded");

    // 3. the same, persistent: all launched
    t0 = etu - 60;
    start(t0, 50, 4, 0, 1);
    wait_idle();
    ok = (samp.size() == 4);
    foreach (samp[i]) if (samp[i] != t0 + 50*i) ok = 0;
    check(ok, "late persistent run: every request launched in order");
    check(discarded == 16'd2, "persistent run discards nothing");

    // 4. immediate, not persistent, first request late: cancelled
    t0 = etu - 5;
    start(t0, 10, 5, 1, 0);
    wait_idle();
    check(samp.size() == 0 && n_cancel == 1, $sformatf("late immediate run cancelled without requests (%0d requests, %0d cancels)", samp.size(), n_cancel));

    // 5. immediate in time: back to back from t_start - preload
    t0 = etu + 80;
    fork
      start(t0, 10, 5, 1, 0);
      repeat (300) begin @(negedge clk); ready = ($urandom % 3 != 0); end
    join_any
    wait_idle();
    ready = 1;
    ok = (samp.size() == 5);
    foreach (samp[i]) if (samp[i] != t0 + 10*i) ok = 0;
    check(ok, "immediate run: five requests with their sampling times");
    check(offered_at.size() > 0 && offered_at[0] == t0 - 19, "immediate run: first request at t_start - preload");
    check(offered_at.size() == 5 && offered_at[4] < t0, "immediate run: all launched before t_start");

    // 6. endless run stopped by deactivation
    t0 = etu + 40;
    start(t0, 30, 0, 0, 0);
    while (samp.size() < 4) @(negedge clk);
    check(active, "endless run still active after four requests");
    deact = 1; @(negedge clk); deact = 0;
    repeat (200) @(negedge clk);
    check(!active && samp.size() == 4, "deactivation stops the run");

    // 7. undefined ROIP ignores activation
    @(negedge clk); cfg.defined = 0; act = 1; @(negedge clk); act = 0;
    repeat (5) @(negedge clk);
    check(!active, "undefined ROIP stays inactive");

    check(unstable == 0, "offered request stable until accepted");
    check(req.roip_id == 8'd9, "ROIP id carried in the request");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
