// exposure_ctrl: drives the exposure line of the sensor firmware with a
// periodic sequence of exposures.
//
// States (as specified): IDLE, ARM (parameters taken, waiting for the start
// event) and RUN (exposures running). A start pulse while the unit is idle
// registers param_i and enters ARM; a start while busy_o is high is
// ignored. ARM leaves for RUN when
//   - immediate mode: at once,
//   - triggered mode: when trigger_i is high,
//   - normal mode:    when the ETU time reaches t0 (or has passed it).
// In RUN each repetition cycle lasts t_repetition ETU; exposure_o is high
// for the first t_exposure ETU of each cycle. After n_loop cycles the unit
// returns to IDLE (n_loop = 0 repeats forever). A stop pulse is registered:
// in ARM it returns to IDLE at once, in RUN the running cycle is completed
// and the next one is not started.
//
// exp_time_o holds the ETU time at which the latest exposure began and
// state_o the current state; both go into the status stream. Time advances
// on etu_tick_i, the cycle in which the ETU counter increments. Inside: a
// state machine, a counter of remaining exposures and a counter of ETU
// ticks within the cycle, as the document describes. Ending the sequence at
// the end of the last repetition cycle, and starting in normal mode also
// when t0 has already passed, are this design's choices.
module exposure_ctrl (
  input  logic                    clk,
  input  logic                    rst,
  input  edicam_pkg::etu_t        etu_time_i,
  input  logic                    etu_tick_i,
  input  logic                    start_i,
  input  logic                    stop_i,
  input  logic                    trigger_i,
  input  edicam_pkg::exp_param_t  param_i,
  output logic                    exposure_o,
  output logic                    busy_o,
  output edicam_pkg::exp_state_e  state_o,
  output edicam_pkg::etu_t        exp_time_o
);
  import edicam_pkg::*;

  exp_state_e  state;
  exp_param_t  par;
  logic        stop_q;
  logic [31:0] cyc_cnt;   // ETU ticks since the current exposure began
  logic [15:0] remaining; // exposures still to do (when n_loop != 0)
  logic        go;
  logic        last_cycle;

  assign busy_o  = (state != EXP_IDLE);
  assign state_o = state;

  always_comb begin
    go = 1'b0;
    if (par.immediate)      go = 1'b1;
    else if (par.triggered) go = trigger_i;
    else                    go = (etu_time_i >= par.t0);
  end

  assign last_cycle = stop_q || ((par.n_loop != 16'd0) && (remaining == 16'd1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= EXP_IDLE;
      par        <= '0;
      stop_q     <= 1'b0;
      cyc_cnt    <= '0;
      remaining  <= '0;
      exposure_o <= 1'b0;
      exp_time_o <= '0;
    end else begin
      if (stop_i && state != EXP_IDLE) stop_q <= 1'b1;
      unique case (state)
        EXP_IDLE: begin
          exposure_o <= 1'b0;
          stop_q     <= 1'b0;
          if (start_i) begin
            par   <= param_i;
            state <= EXP_ARM;
          end
        end
        EXP_ARM: begin
          if (stop_i || stop_q) begin
            state <= EXP_IDLE;
          end else if (go) begin
            state      <= EXP_RUN;
            exposure_o <= (par.t_exposure != 32'd0);
            exp_time_o <= etu_time_i;
            cyc_cnt    <= '0;
            remaining  <= par.n_loop;
          end
        end
        EXP_RUN: begin
          if (etu_tick_i) begin
            cyc_cnt <= cyc_cnt + 1'b1;
            if (cyc_cnt + 1'b1 == par.t_exposure) exposure_o <= 1'b0;
            if (cyc_cnt + 1'b1 >= par.t_repetition) begin
              if (last_cycle || stop_i) begin
                state      <= EXP_IDLE;
                exposure_o <= 1'b0;
              end else begin
                cyc_cnt    <= '0;
                remaining  <= remaining - 1'b1;
                exposure_o <= (par.t_exposure != 32'd0);
                exp_time_o <= etu_time_i + 1'b1;
              end
            end
          end
        end
        default: state <= EXP_IDLE;
      endcase
    end
  end
endmodule
