// event_processor: the low-latency event mechanism of the IPCU. N_EVENTS
// events, each with N_IN input stages, an event stage and N_ACT action
// bits, and one action stage driving the predefined actions (ROIP
// activation and deactivation, readout trigger, exposure trigger, output
// pins, host interrupt).
//
// Event inputs come from the host (a register bit), from the ROI data
// processor's threshold bits (res_valid_i, res_id_i, res_hits_i), from external inputs
// (ext_i, passed through base synchronisers), from the states of the events
// themselves (registered, so no combinational loop) and from the ETU time.
// All selections are run-time configuration, normally held in the register
// table: in_cfg_i per input, ev_cfg_i per event, and the action
// multiplexer settings. clr_i clears the sticky channel states and re-arms
// the once-only ROIP actions.
//
// Latency with event delay 0: a host bit reaches an action output after
// 3 cycles (input stage, event, action); an external input after 6 (2 sync,
// edge/mode register, input stage, event, action); a RDP result after 4. The structure is the document's; the
// numbers of events, inputs, actions, pins and ROIPs are this design's
// choice (the document's figure shows 2 events with 4 actions each as an
// example, and 4 action bits per event are used here).
module event_processor #(
  parameter int N_EVENTS = 8,
  parameter int N_IN     = 4,
  parameter int N_ACT    = 4,
  parameter int N_EXT    = 8,
  parameter int N_ROIP   = 16,
  parameter int N_PIN    = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clr_i,
  input  edicam_pkg::etu_t         etu_time_i,
  input  logic                     etu_tick_i,
  input  logic [N_EXT-1:0]         ext_i,
  input  logic                     res_valid_i,
  input  logic [edicam_pkg::ID_W-1:0] res_id_i,   // ROIP of the RDP result
  input  logic [2:0]               res_hits_i,  // {sum, max, min} above threshold
  // configuration
  input  edicam_pkg::ep_in_cfg_t   in_cfg_i [N_EVENTS][N_IN],
  input  edicam_pkg::ep_ev_cfg_t   ev_cfg_i [N_EVENTS],
  input  edicam_pkg::ep_act_sel_t  roip_act_sel_i   [N_ROIP],
  input  edicam_pkg::ep_act_sel_t  roip_deact_sel_i [N_ROIP],
  input  logic [N_ROIP-1:0]        roip_ctrl_i,
  input  edicam_pkg::ep_act_sel_t  roip_trig_sel_i,
  input  edicam_pkg::ep_act_sel_t  exp_trig_sel_i,
  input  edicam_pkg::ep_act_sel_t  irq_sel_i,
  input  edicam_pkg::ep_act_sel_t  pin_sel_i [N_PIN],
  input  logic [N_PIN-1:0]         pin_change_i,
  // actions
  output logic [N_EVENTS-1:0]      event_state_o,
  output logic [N_ROIP-1:0]        roip_act_o,
  output logic [N_ROIP-1:0]        roip_deact_o,
  output logic                     roip_trig_o,
  output logic                     exp_trig_o,
  output logic                     irq_o,
  output logic [N_PIN-1:0]         pin_o
);
  import edicam_pkg::*;

  logic [N_EXT-1:0] ext_s;
  logic [N_IN-1:0]  in_bits  [N_EVENTS];
  logic [N_ACT-1:0] act_bits [N_EVENTS];

  base_sync #(.W(N_EXT)) u_ext_sync (.clk, .rst, .d_i(ext_i), .q_o(ext_s));

  for (genvar e = 0; e < N_EVENTS; e++) begin : g_ev
    for (genvar i = 0; i < N_IN; i++) begin : g_in
      ep_input_stage #(.N_EXT(N_EXT), .N_EVENTS(N_EVENTS)) u_in (
        .clk, .rst, .clr_i, .cfg_i(in_cfg_i[e][i]), .etu_time_i, .ext_i(ext_s),
        .evt_i(event_state_o), .res_valid_i, .res_id_i, .res_hits_i, .in_o(in_bits[e][i]));
    end
    ep_event #(.N_IN(N_IN), .N_ACT(N_ACT)) u_event (
      .clk, .rst, .etu_tick_i, .cfg_i(ev_cfg_i[e]), .in_i(in_bits[e]),
      .state_o(event_state_o[e]), .act_o(act_bits[e]));
  end

  ep_action #(.N_EVENTS(N_EVENTS), .N_ACT(N_ACT), .N_ROIP(N_ROIP), .N_PIN(N_PIN)) u_action (
    .clk, .rst, .clr_i, .act_bits_i(act_bits), .roip_act_sel_i, .roip_deact_sel_i, .roip_ctrl_i,
    .roip_trig_sel_i, .exp_trig_sel_i, .irq_sel_i, .pin_sel_i, .pin_change_i,
    .roip_act_o, .roip_deact_o, .roip_trig_o, .exp_trig_o, .irq_o, .pin_o);

  initial assert (N_IN <= EP_MAX_IN && N_ACT <= EP_MAX_ACT && N_EVENTS <= 16 && N_EXT <= 16)
    else $fatal(1, "event_processor: size beyond configuration field widths");
endmodule
