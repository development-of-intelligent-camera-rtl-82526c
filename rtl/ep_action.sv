// ep_action: the action stage of the event processor. Every predefined
// action picks one action bit through an event multiplexer (which event)
// and an action multiplexer (which of its action bits); oe = 0 disables it.
//   roip_act_o / roip_deact_o  per ROIP. Set mode: a one-cycle pulse on the
//       rising edge of the selected bit, once only (re-armed by clr_i).
//       Control mode (roip_ctrl_i): the act selection drives both, act on
//       its rising and deact on its falling edge.
//   roip_trig_o, exp_trig_o, irq_o  one-cycle pulses on rising edges
//       (readout trigger and exposure trigger to the SM, host interrupt).
//   pin_o  per pin: level control (pin follows the bit) or, with
//       pin_change_i, toggled on each rising edge.
// Outputs are registered. Follows the document's action stage; the pulse
// shapes are this design's choices.
module ep_action #(
  parameter int N_EVENTS = 8,
  parameter int N_ACT    = 4,
  parameter int N_ROIP   = 16,
  parameter int N_PIN    = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clr_i,
  input  logic [N_ACT-1:0]         act_bits_i [N_EVENTS],
  input  edicam_pkg::ep_act_sel_t  roip_act_sel_i   [N_ROIP],
  input  edicam_pkg::ep_act_sel_t  roip_deact_sel_i [N_ROIP],
  input  logic [N_ROIP-1:0]        roip_ctrl_i,
  input  edicam_pkg::ep_act_sel_t  roip_trig_sel_i,
  input  edicam_pkg::ep_act_sel_t  exp_trig_sel_i,
  input  edicam_pkg::ep_act_sel_t  irq_sel_i,
  input  edicam_pkg::ep_act_sel_t  pin_sel_i [N_PIN],
  input  logic [N_PIN-1:0]         pin_change_i,
  output logic [N_ROIP-1:0]        roip_act_o,
  output logic [N_ROIP-1:0]        roip_deact_o,
  output logic                     roip_trig_o,
  output logic                     exp_trig_o,
  output logic                     irq_o,
  output logic [N_PIN-1:0]         pin_o
);
  import edicam_pkg::*;

  // Action bits padded to the full multiplexer range (16 events x 8 bits);
  // selections beyond N_EVENTS / N_ACT read 0.
  logic [7:0] bits_pad [16];
  always_comb begin
    for (int e = 0; e < 16; e++) bits_pad[e] = (e < N_EVENTS) ? 8'(act_bits_i[e]) : 8'd0;
  end

  function automatic logic pick(input ep_act_sel_t s, input logic [7:0] b [16]);
    return s.oe && b[s.evt][s.bit_sel];
  endfunction

  logic [N_ROIP-1:0] a_now, d_now, a_q, d_q, a_done, d_done;
  logic [N_PIN-1:0]  p_now, p_q;
  logic rt_now, et_now, ir_now, rt_q, et_q, ir_q;

  always_comb begin
    for (int r = 0; r < N_ROIP; r++) begin
      a_now[r] = pick(roip_act_sel_i[r], bits_pad);
      d_now[r] = roip_ctrl_i[r] ? a_now[r] : pick(roip_deact_sel_i[r], bits_pad);
    end
    for (int p = 0; p < N_PIN; p++) p_now[p] = pick(pin_sel_i[p], bits_pad);
    rt_now = pick(roip_trig_sel_i, bits_pad);
    et_now = pick(exp_trig_sel_i, bits_pad);
    ir_now = pick(irq_sel_i, bits_pad);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0; d_q <= '0; p_q <= '0; a_done <= '0; d_done <= '0;
      rt_q <= 1'b0; et_q <= 1'b0; ir_q <= 1'b0;
      roip_act_o <= '0; roip_deact_o <= '0; roip_trig_o <= 1'b0; exp_trig_o <= 1'b0;
      irq_o <= 1'b0; pin_o <= '0;
    end else begin
      a_q <= a_now; d_q <= d_now; p_q <= p_now;
      rt_q <= rt_now; et_q <= et_now; ir_q <= ir_now;
      roip_trig_o <= rt_now && !rt_q;
      exp_trig_o  <= et_now && !et_q;
      irq_o       <= ir_now && !ir_q;
      for (int r = 0; r < N_ROIP; r++) begin
        if (roip_ctrl_i[r]) begin
          roip_act_o[r]   <= a_now[r] && !a_q[r];
          roip_deact_o[r] <= !d_now[r] && d_q[r];
        end else begin
          roip_act_o[r]   <= a_now[r] && !a_q[r] && !a_done[r];
          roip_deact_o[r] <= d_now[r] && !d_q[r] && !d_done[r];
          if (a_now[r] && !a_q[r]) a_done[r] <= 1'b1;
          if (d_now[r] && !d_q[r]) d_done[r] <= 1'b1;
        end
        if (clr_i) begin a_done[r] <= 1'b0; d_done[r] <= 1'b0; end
      end
      for (int p = 0; p < N_PIN; p++) begin
        if (pin_change_i[p]) begin
          if (p_now[p] && !p_q[p]) pin_o[p] <= !pin_o[p];
        end else pin_o[p] <= p_now[p];
      end
    end
  end
endmodule
