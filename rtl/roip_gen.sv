// roip_gen: the request scheduler of one Region Of Interest Process (ROIP)
// core. After activation it turns the ROIP's timing description into
// individual readout requests for the SM, one per readout.
//
// Following the document: the k-th readout has sampling time
// t_start + k*T_period and there are N_loop of them. A normal ROIP
// launches request k T_PRELOAD before its sampling time. When it finds a
// request whose sampling time is not in the future (for example after a
// late activation) and the ROIP is not persistent, it discards that
// request and moves on to the next. An immediate ROIP launches its first
// request at t_start - T_PRELOAD and the rest as fast as they are accepted.
// If it is not persistent and the first one is already late, it cancels
// the whole run. A persistent ROIP launches every request. The immediate,
// persistent and triggered flags travel with each request.
//
// This design's choices: N_loop = 0 means endless, as for exposures;
// T_PRELOAD is a parameter (its value is not given); the triggered flag
// does not change the preload; activation is ignored unless the ROIP is
// defined and restarts the run from k = 0; deactivation stops it at once,
// withdrawing an offered request. Requests leave through a valid/ready
// handshake: req_o is stable while req_valid_o is high.
//
// Timing: a request is offered the cycle after its launch time is seen;
// an accepted request lets the next one be examined one cycle later.
module roip_gen #(
  parameter logic [31:0] T_PRELOAD = 32'd1000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [edicam_pkg::ID_W-1:0] roip_id_i,
  input  edicam_pkg::roip_cfg_t cfg_i,
  input  edicam_pkg::etu_t      etu_time_i,
  input  logic                  activate_i,
  input  logic                  deactivate_i,
  output logic                  active_o,
  output logic                  req_valid_o,
  output edicam_pkg::roip_req_t req_o,
  input  logic                  req_ready_i,
  output logic [15:0]           discarded_o,   // requests dropped as late
  output logic                  cancelled_o    // pulse: immediate run cancelled
);
  import edicam_pkg::*;

  typedef enum logic [1:0] {G_IDLE, G_WAIT, G_OFFER} g_state_e;
  g_state_e    st;
  etu_t        samp;       // sampling time of request k
  logic [15:0] k;          // requests handled so far
  logic        imm, pers, trg;
  logic [31:0] period;
  logic [15:0] nloop;

  logic launch_due, late, last;
  assign launch_due = (etu_time_i + etu_t'(T_PRELOAD)) >= samp;
  assign late       = etu_time_i >= samp;
  assign last       = (nloop != 16'd0) && (k + 16'd1 == nloop);

  assign active_o    = (st != G_IDLE);
  assign req_valid_o = (st == G_OFFER);
  assign req_o       = '{roip_id: roip_id_i, immediate: imm, persistent: pers,
                         triggered: trg, sample_time: samp};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= G_IDLE; samp <= '0; k <= '0; imm <= 1'b0; pers <= 1'b0; trg <= 1'b0;
      period <= '0; nloop <= '0; discarded_o <= '0; cancelled_o <= 1'b0;
    end else begin
      cancelled_o <= 1'b0;
      if (deactivate_i) st <= G_IDLE;
      else if (activate_i && cfg_i.defined) begin
        st <= G_WAIT; samp <= cfg_i.t_start; k <= '0;
        imm <= cfg_i.immediate; pers <= cfg_i.persistent; trg <= cfg_i.triggered;
        period <= cfg_i.t_period; nloop <= cfg_i.n_loop;
      end else begin
        unique case (st)
          G_IDLE: ;
          G_WAIT:
            if (imm) begin
              if (k != 16'd0) st <= G_OFFER;
              else if (launch_due) begin
                if (late && !pers) begin st <= G_IDLE; cancelled_o <= 1'b1; end
                else st <= G_OFFER;
              end
            end else if (launch_due) begin
              if (late && !pers) begin
                discarded_o <= discarded_o + 16'd1;
                samp <= samp + etu_t'(period); k <= k + 16'd1;
                if (last) st <= G_IDLE;
              end else st <= G_OFFER;
            end
          G_OFFER:
            if (req_ready_i) begin
              samp <= samp + etu_t'(period); k <= k + 16'd1;
              st <= last ? G_IDLE : G_WAIT;
            end
          default: st <= G_IDLE;
        endcase
      end
    end
  end
endmodule
