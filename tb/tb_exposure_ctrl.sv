// tb_exposure_ctrl: self-checking test of the exposure controller. ETU time
// advances every second clock (tick in the cycle before the increment).
// Runs the document's demonstration sequence scaled by 1/100000 (t0 = 290,
// exposure 20, repetition 100, two exposures), then triggered, immediate,
// stop in ARM, stop in RUN and a start while busy.
module tb_exposure_ctrl;
  import edicam_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  etu_t etu = 0; logic tick = 0;
  always @(posedge clk) begin
    tick <= ~tick;
    if (tick) etu <= etu + 1;
  end

  logic start = 0, stop = 0, trig = 0, expo, busy;
  exp_param_t par; exp_state_e state; etu_t exp_time;

  exposure_ctrl dut (.clk, .rst, .etu_time_i(etu), .etu_tick_i(tick), .start_i(start), .stop_i(stop),
    .trigger_i(trig), .param_i(par), .exposure_o(expo), .busy_o(busy), .state_o(state), .exp_time_o(exp_time));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (etu=%0d)", what, etu); end
  endtask

  // Log exposure intervals in ETU.
  etu_t rise[$], fall[$];
  logic expo_q = 0;
  always @(posedge clk) begin
    expo_q <= expo && !rst;
    if (expo && !expo_q && !rst) rise.push_back(etu);
    if (!expo && expo_q && !rst) fall.push_back(etu);
  end

  task automatic pulse_start(input exp_param_t p);
    @(negedge clk); par = p; start = 1; @(negedge clk); start = 0;
  endtask
  task automatic wait_idle();
    int g = 0;
    while (busy && g < 100000) begin @(negedge clk); g++; end
  endtask

  initial begin
    exp_param_t p;
    par = '0;
    repeat (3) @(negedge clk); rst = 0;

    // demonstration sequence, scaled
    p = '0; p.t0 = 290; p.t_exposure = 20; p.t_repetition = 100; p.n_loop = 2;
    pulse_start(p);
    check(state == EXP_ARM && busy, "ARM after start");
    while (etu < 200) @(negedge clk);
    check(state == EXP_ARM && !expo, "still armed before t0");
    pulse_start(p);            // ignored: busy
    wait_idle();
    check(rise.size() == 2 && rise[0] == 290 && rise[1] == 390, "exposures start at t0 and t0+T_rep");
    check(fall.size() == 2 && fall[0] == 310 && fall[1] == 410, "exposures last T_exposure");
    check(exp_time == 390, "time stamp of last exposure");
    check(etu >= 490 && etu <= 492, "IDLE after last repetition period");

    // triggered
    rise.delete(); fall.delete();
    p = '0; p.triggered = 1; p.t_exposure = 5; p.t_repetition = 10; p.n_loop = 3;
    pulse_start(p);
    repeat (50) @(negedge clk);
    check(rise.size() == 0 && state == EXP_ARM, "triggered waits for trigger");
    trig = 1; @(negedge clk); trig = 0;
    wait_idle();
    check(rise.size() == 3 && fall.size() == 3 && fall[0] - rise[0] == 5 && rise[1] - rise[0] == 10, "three triggered exposures");

    // immediate, stop during RUN finishes the running cycle
    rise.delete(); fall.delete();
    p = '0; p.immediate = 1; p.t_exposure = 4; p.t_repetition = 10; p.n_loop = 0;
    pulse_start(p);
    @(negedge clk);
    check(state == EXP_RUN && expo, "immediate starts at once");
    repeat (45) @(negedge clk);   // into the 3rd cycle
    stop = 1; @(negedge clk); stop = 0;
    check(busy, "stop in RUN does not cut the running cycle");
    wait_idle();
    check(rise.size() == 3 && fall.size() == 3, "endless sequence stopped after the running cycle");

    // stop in ARM
    p = '0; p.t0 = etu + 1000; p.t_exposure = 4; p.t_repetition = 10;
    pulse_start(p);
    stop = 1; @(negedge clk); stop = 0; @(negedge clk);
    check(state == EXP_IDLE && !busy, "stop in ARM returns to IDLE");
    check(rise.size() == 3, "no exposure after stop in ARM");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
