// tb_event_processor: self-checking test of the event processor. Sets up
// events through the configuration ports and checks each input channel
// (host bit, external input in control / set / toggle mode, ROI data
// processor threshold result, ETU time, another event's state), the
// event delay in ETU, the input/output negation, and each action (exposure
// trigger, readout trigger, interrupt, pin in level and toggle mode, ROIP
// activation in set mode and control mode). Latencies from input to action
// output are checked in clock cycles against the register stages of the
// design (3 cycles from a host bit, 6 from an external pin, 4 from a RDP
// result). The count n is the number of clock edges after the one that
// applied the stimulus.
module tb_event_processor;
  import edicam_pkg::*;
  localparam int NE = 8, NI = 4, NA = 4, NX = 8, NR = 16, NP = 4;

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0;
  always #5 clk = !clk;
  etu_t etu = '0;
  logic tick = 1'b0;
  logic [NX-1:0] ext = '0;
  logic res_valid = 1'b0;
  logic [ID_W-1:0] res_id = '0;
  logic [2:0] res_hits = '0;
  ep_in_cfg_t  in_cfg [NE][NI];
  ep_ev_cfg_t  ev_cfg [NE];
  ep_act_sel_t ra_sel [NR], rd_sel [NR], pin_sel [NP];
  ep_act_sel_t rt_sel, et_sel, irq_sel;
  logic [NR-1:0] rctrl = '0;
  logic [NP-1:0] pchg = '0;
  logic [NE-1:0] evs;
  logic [NR-1:0] ract, rdeact;
  logic rtrig, etrig, irq;
  logic [NP-1:0] pins;

  event_processor #(.N_EVENTS(NE), .N_IN(NI), .N_ACT(NA), .N_EXT(NX), .N_ROIP(NR), .N_PIN(NP)) dut (
    .clk, .rst, .clr_i(clr), .etu_time_i(etu), .etu_tick_i(tick), .ext_i(ext),
    .res_valid_i(res_valid), .res_id_i(res_id), .res_hits_i(res_hits),
    .in_cfg_i(in_cfg), .ev_cfg_i(ev_cfg), .roip_act_sel_i(ra_sel), .roip_deact_sel_i(rd_sel),
    .roip_ctrl_i(rctrl), .roip_trig_sel_i(rt_sel), .exp_trig_sel_i(et_sel), .irq_sel_i(irq_sel),
    .pin_sel_i(pin_sel), .pin_change_i(pchg), .event_state_o(evs), .roip_act_o(ract),
    .roip_deact_o(rdeact), .roip_trig_o(rtrig), .exp_trig_o(etrig), .irq_o(irq), .pin_o(pins));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ETU: one tick every 4 cycles
  int tdiv = 0;
  always @(posedge clk) begin
    tdiv <= (tdiv == 3) ? 0 : tdiv + 1;
    tick <= (tdiv == 3);
    if (tdiv == 3) etu <= etu + 1;
  end

  int n_etrig = 0, n_rtrig = 0, n_irq = 0;
  int n_act [NR], n_deact [NR];
  initial foreach (n_act[i]) begin n_act[i] = 0; n_deact[i] = 0; end
  always @(posedge clk) if (!rst) begin
    n_etrig += int'(etrig); n_rtrig += int'(rtrig); n_irq += int'(irq);
    for (int r = 0; r < NR; r++) begin n_act[r] += int'(ract[r]); n_deact[r] += int'(rdeact[r]); end
  end

  function automatic ep_act_sel_t sel(input int e, input int b);
    sel.oe = 1'b1; sel.evt = 4'(e); sel.bit_sel = 3'(b);
  endfunction
  // input that is always true (host bit 0, negated)
  function automatic ep_in_cfg_t c_true();
    c_true = '0; c_true.type_sel = IN_HOST;
  endfunction

  // wait up to MAX cycles for SIG, count in n
`define WAIT_FOR(SIG, MAX) begin n = 0; while (!(SIG) && n < (MAX)) begin @(posedge clk); n++; end end

  int n;
  initial begin
    foreach (in_cfg[e, i]) in_cfg[e][i] = c_true();
    foreach (ev_cfg[e]) begin ev_cfg[e] = '0; ev_cfg[e].in_inv = 8'hFE; end  // in0 must be 1
    foreach (ra_sel[r]) begin ra_sel[r] = '0; rd_sel[r] = '0; end
    foreach (pin_sel[p]) pin_sel[p] = '0;
    rt_sel = '0; et_sel = '0; irq_sel = '0;
    // event 0: host bit -> exposure trigger
    et_sel = sel(0, 0);
    // event 1: external input 2, control mode -> pin 0 (level), ROIP 3 (set), ROIP 4 (control)
    in_cfg[1][0].type_sel = IN_EXT_EVT; in_cfg[1][0].ext_sel = 4'd2; in_cfg[1][0].ee_mode = EE_CONTROL;
    pin_sel[0] = sel(1, 0);
    ra_sel[3] = sel(1, 1); rd_sel[3] = sel(1, 2);
    ev_cfg[1].act_inv = 8'b0000_0100;   // bit 2 is the negated state
    ra_sel[4] = sel(1, 3); rctrl[4] = 1'b1;
    // event 2: host bit with delay 3 ETU, negated output -> none; watch state
    ev_cfg[2].delay = 32'd3;
    // event 3: image channel, ROIP 5 maximum -> readout trigger
    in_cfg[3][0].type_sel = IN_IMAGE; in_cfg[3][0].ref_id = 8'd5; in_cfg[3][0].img_sel = IMG_MAX;
    rt_sel = sel(3, 0);
    // event 4: ETU time 100 -> interrupt
    in_cfg[4][0].type_sel = IN_ETU; in_cfg[4][0].etu_ref = 64'd100;
    irq_sel = sel(4, 0);
    // event 5: external input 3, toggle on rising edge -> pin 1 toggle mode
    in_cfg[5][0].type_sel = IN_EXT_EVT; in_cfg[5][0].ext_sel = 4'd3; in_cfg[5][0].ee_mode = EE_TOGGLE;
    pin_sel[1] = sel(5, 0); pchg[1] = 1'b1;
    // event 6: state of event 5 AND NOT external 4 (set on falling edge)
    in_cfg[6][0].type_sel = IN_EXT_EVT; in_cfg[6][0].use_event = 1'b1; in_cfg[6][0].evt_sel = 4'd5;
    in_cfg[6][1].type_sel = IN_EXT_EVT; in_cfg[6][1].ext_sel = 4'd4; in_cfg[6][1].ee_mode = EE_SET;
    in_cfg[6][1].ee_falling = 1'b1;
    ev_cfg[6].in_inv = 8'hFC;            // in0 and in1 used as true
    // event 7: output negation: AND of true inputs, negated -> state 0
    ev_cfg[7].in_inv = 8'hFF; ev_cfg[7].out_inv = 1'b1;

    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    check(evs[0] == 1'b0 && evs[7] == 1'b0, "events idle after reset");

    // 1. host channel, latency 3 cycles to the exposure trigger
    in_cfg[0][0].host_val <= 1'b1;
    @(posedge clk);
    `WAIT_FOR(etrig, 20)
    check(etrig && n == 3, $sformatf("host -> exposure trigger, %0d+1 cycles", n));
    check(evs[0], "event 0 active");
    in_cfg[0][0].host_val <= 1'b0;
    repeat (4) @(posedge clk);
    check(!evs[0] && n_etrig == 1, "one exposure trigger");

    // 2. external input, control mode, latency 5 cycles to the pin
    ext[2] <= 1'b1;
    @(posedge clk);
    `WAIT_FOR(pins[0], 20)
    check(pins[0] && n == 6, $sformatf("external -> pin level, %0d+1 cycles", n));
    repeat (2) @(posedge clk);
    check(n_act[3] == 1 && n_act[4] == 1, "ROIP act in set and control mode");
    ext[2] <= 1'b0;
    repeat (8) @(posedge clk);
    check(!pins[0], "pin follows external input down");
    check(n_deact[3] == 1 && n_deact[4] == 1, "ROIP deact in set and control mode");
    ext[2] <= 1'b1; repeat (8) @(posedge clk); ext[2] <= 1'b0; repeat (8) @(posedge clk);
    check(n_act[3] == 1 && n_deact[3] == 1, "set mode fires only once");
    check(n_act[4] == 2 && n_deact[4] == 2, "control mode fires every time");
    clr <= 1'b1; @(posedge clk); clr <= 1'b0;
    ext[2] <= 1'b1; repeat (8) @(posedge clk); ext[2] <= 1'b0; repeat (8) @(posedge clk);
    check(n_act[3] == 2 && n_deact[3] == 2, "clear re-arms set mode");

    // 3. delay of 3 ETU (12 cycles at 4 cycles per ETU)
    in_cfg[2][0].host_val <= 1'b1;
    @(posedge clk);
    n = 0;
    while (!evs[2] && n < 100) begin @(posedge clk); n++; end
    check(evs[2] && n >= 12 && n <= 17, $sformatf("event delay of 3 ETU took %0d cycles", n));
    in_cfg[2][0].host_val <= 1'b0;
    in_cfg[2][0].host_val <= 1'b1; // short glitch back: no state change expected
    @(posedge clk);
    check(evs[2], "state kept");

    // 4. image channel
    @(posedge clk);
    res_valid <= 1'b1; res_id <= 8'd4; res_hits <= 3'b010; @(posedge clk);   // other ROIP
    res_valid <= 1'b0; repeat (4) @(posedge clk);
    check(n_rtrig == 0 && !evs[3], "result of another ROIP ignored");
    res_valid <= 1'b1; res_id <= 8'd5; res_hits <= 3'b010; @(posedge clk);
    res_valid <= 1'b0;
    `WAIT_FOR(rtrig, 20)
    check(rtrig && n == 4, $sformatf("RDP maximum -> readout trigger, %0d+1 cycles", n));
    res_valid <= 1'b1; res_id <= 8'd5; res_hits <= 3'b101; @(posedge clk);
    res_valid <= 1'b0; repeat (4) @(posedge clk);
    check(!evs[3] && n_rtrig == 1, "maximum below threshold clears image input");

    // 5. toggle mode and event feedback
    ext[3] <= 1'b1; repeat (3) @(posedge clk); ext[3] <= 1'b0; repeat (8) @(posedge clk);
    check(evs[5] && pins[1], "toggle on: event 5 and pin 1 high");
    check(!evs[6], "event 6 waits for external 4 falling edge");
    ext[4] <= 1'b1; repeat (3) @(posedge clk); ext[4] <= 1'b0; repeat (8) @(posedge clk);
    check(evs[6], "event 6 = event 5 AND edge-set input");
    ext[3] <= 1'b1; repeat (3) @(posedge clk); ext[3] <= 1'b0; repeat (8) @(posedge clk);
    check(!evs[5] && pins[1] && !evs[6], "toggle off: event 5 and event 6 low, pin 1 kept");
    ext[3] <= 1'b1; repeat (3) @(posedge clk); ext[3] <= 1'b0; repeat (8) @(posedge clk);
    check(evs[5] && !pins[1], "pin 1 toggles on the next rising edge");

    // 6. ETU channel
    wait (etu >= 64'd100);
    @(posedge clk);
    `WAIT_FOR(irq, 20)
    check(irq && n <= 4, $sformatf("ETU time -> interrupt after %0d+1 cycles", n));
    repeat (5) @(posedge clk);
    check(n_irq == 1 && evs[4], "one interrupt, event 4 stays on");
    check(!evs[7], "negated output");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
`undef WAIT_FOR

  initial begin
    #200us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
