// ep_event: one event. Its N_IN input bits are each optionally negated
// (in_inv), combined by AND, the result optionally negated (out_inv); a
// change of that result reaches the event state only after it has held for
// delay ETU (0: next cycle). The state, XOR each action invert bit, gives
// the N_ACT action bits for the action stage. As described in the
// document; restarting the delay when the result flips back is this
// design's choice.
module ep_event #(
  parameter int N_IN  = 4,
  parameter int N_ACT = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    etu_tick_i,
  input  edicam_pkg::ep_ev_cfg_t  cfg_i,
  input  logic [N_IN-1:0]         in_i,
  output logic                    state_o,
  output logic [N_ACT-1:0]        act_o
);
  logic        raw;
  logic [31:0] cnt;

  assign raw   = (&(in_i ^ cfg_i.in_inv[N_IN-1:0])) ^ cfg_i.out_inv;
  assign act_o = {N_ACT{state_o}} ^ cfg_i.act_inv[N_ACT-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state_o <= 1'b0; cnt <= '0;
    end else if (raw == state_o) begin
      cnt <= '0;
    end else if (cnt >= cfg_i.delay) begin
      state_o <= raw; cnt <= '0;
    end else if (etu_tick_i) begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
