// ep_input_stage: one event input of the event processor. Four channels,
// one of which is switched to the output by cfg_i.type_sel:
//   HOST      the register bit host_val, written by the host;
//   IMAGE     a register loaded, whenever the ROI data processor reports a
//             result for ROIP ref_id, with the selected comparison bit
//             (minimum, maximum or sum above threshold);
//   EXT_EVT   an external input or another event's state (ext_sel /
//             evt_sel, use_event), used as is (control mode), or setting
//             the output on a chosen edge (set mode), or inverting it on
//             that edge (toggle mode);
//   ETU       a register that goes high once the ETU time reaches etu_ref.
// clr_i clears the registers of the IMAGE and EXT_EVT channels (set and
// toggle modes keep their state otherwise). Output is registered, one
// cycle after its cause. Channel set-up is the document's; the clear input
// and the register timing are this design's choices.
module ep_input_stage #(
  parameter int N_EXT    = 8,
  parameter int N_EVENTS = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clr_i,
  input  edicam_pkg::ep_in_cfg_t  cfg_i,
  input  edicam_pkg::etu_t        etu_time_i,
  input  logic [N_EXT-1:0]        ext_i,
  input  logic [N_EVENTS-1:0]     evt_i,
  input  logic                    res_valid_i,
  input  logic [edicam_pkg::ID_W-1:0] res_id_i,
  input  logic [2:0]              res_hits_i,  // {sum, max, min} above threshold
  output logic                    in_o
);
  import edicam_pkg::*;

  logic img_q, etu_q, ee_q, sel_q, sel;
  logic img_bit, edge_seen;
  logic [15:0] ext_pad, evt_pad;

  assign ext_pad = 16'(ext_i);
  assign evt_pad = 16'(evt_i);

  always_comb begin
    unique case (cfg_i.img_sel)
      IMG_MIN: img_bit = res_hits_i[0];
      IMG_MAX: img_bit = res_hits_i[1];
      default: img_bit = res_hits_i[2];
    endcase
    sel = cfg_i.use_event ? evt_pad[cfg_i.evt_sel] : ext_pad[cfg_i.ext_sel];
    edge_seen = cfg_i.ee_falling ? (sel_q && !sel) : (!sel_q && sel);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      img_q <= 1'b0; etu_q <= 1'b0; ee_q <= 1'b0; sel_q <= 1'b0; in_o <= 1'b0;
    end else begin
      sel_q <= sel;
      etu_q <= (etu_time_i >= cfg_i.etu_ref);
      if (clr_i) img_q <= 1'b0;
      else if (res_valid_i && res_id_i == cfg_i.ref_id) img_q <= img_bit;
      if (clr_i) ee_q <= 1'b0;
      else unique case (cfg_i.ee_mode)
        EE_SET:    if (edge_seen) ee_q <= 1'b1;
        EE_TOGGLE: if (edge_seen) ee_q <= !ee_q;
        default:   ee_q <= sel;
      endcase
      unique case (cfg_i.type_sel)
        IN_HOST:  in_o <= cfg_i.host_val;
        IN_IMAGE: in_o <= img_q;
        IN_EXT_EVT: in_o <= ee_q;
        default:  in_o <= etu_q;
      endcase
    end
  end
endmodule
