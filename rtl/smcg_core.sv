// smcg_core: the core unit of the Sensor Module command generator. It sends
// one command at a time as a single packet through the link transmitter.
//
// A command is 1 to 3 header QWs of any content followed by the contents of
// up to 4 source FIFOs, read one after another, each up to and including
// the QW marked last. The caller loads, in one step (load_i):
//   - CMD SHR: the header QWs (cmd_i[0] first) and their number cmd_n_i;
//   - FIFO SHR: the source sequence (fifo_seq_i[0] first, 2-bit source
//     numbers) and its length fifo_n_i (0 to 4);
//   - the packet length in QWs (size_i) for the link transmitter.
// The core then shifts the header out, then reads the selected source FIFO
// while its last bit is low, shifting FIFO SHR at each last, and raises
// tx_req_o with size_i until the transmitter acknowledges. done_o pulses
// then and busy_o falls. Each source offers data, empty, last and takes a
// read strobe (src_rd_o). Output writes wait while tx_full_i is high.
//
// This is the document's structure (CMD SHR and FIFO SHR, each with a
// counter of remaining entries, and a state register); its encoding of
// sources and states is this design's.
module smcg_core #(
  parameter int NSRC = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load_i,
  input  logic [63:0]       cmd_i [3],
  input  logic [1:0]        cmd_n_i,
  input  logic [1:0]        fifo_seq_i [4],
  input  logic [2:0]        fifo_n_i,
  input  logic [23:0]       size_i,
  output logic              busy_o,
  output logic              done_o,
  // source FIFOs
  input  logic [63:0]       src_data_i [NSRC],
  input  logic [NSRC-1:0]   src_empty_i,
  input  logic [NSRC-1:0]   src_last_i,
  output logic [NSRC-1:0]   src_rd_o,
  // link transmitter
  output logic              tx_req_o,
  output logic [23:0]       tx_size_o,
  input  logic              tx_ack_i,
  output logic              tx_wr_o,
  output logic [63:0]       tx_data_o,
  input  logic              tx_full_i
);
  typedef enum logic [1:0] {C_IDLE, C_CMD, C_FIFO, C_ACK} core_state_e;
  core_state_e st;
  logic [63:0] cmd_shr [3];
  logic [1:0]  cmd_cnt;
  logic [1:0]  fifo_shr [4];
  logic [2:0]  fifo_cnt;
  logic [1:0]  sel;
  logic        rd;

  assign sel    = fifo_shr[0];
  assign busy_o = (st != C_IDLE);
  assign rd     = (st == C_FIFO) && !src_empty_i[sel] && !tx_full_i;

  always_comb begin
    src_rd_o = '0;
    src_rd_o[sel] = rd;
    tx_wr_o   = 1'b0;
    tx_data_o = cmd_shr[0];
    if (st == C_CMD) tx_wr_o = !tx_full_i;
    else if (st == C_FIFO) begin
      tx_wr_o   = rd;
      tx_data_o = src_data_i[sel];
    end
  end

  assign tx_req_o = (st != C_IDLE);
  assign done_o   = (st == C_ACK) && tx_ack_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; cmd_cnt <= '0; fifo_cnt <= '0; tx_size_o <= '0;
      for (int i = 0; i < 3; i++) cmd_shr[i] <= '0;
      for (int i = 0; i < 4; i++) fifo_shr[i] <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (load_i) begin
          cmd_shr   <= cmd_i;
          cmd_cnt   <= cmd_n_i;
          fifo_shr  <= fifo_seq_i;
          fifo_cnt  <= fifo_n_i;
          tx_size_o <= size_i;
          st        <= (cmd_n_i != 2'd0) ? C_CMD : (fifo_n_i != 3'd0) ? C_FIFO : C_ACK;
        end
        C_CMD: if (!tx_full_i) begin
          cmd_shr[0] <= cmd_shr[1];
          cmd_shr[1] <= cmd_shr[2];
          cmd_cnt    <= cmd_cnt - 1'b1;
          if (cmd_cnt == 2'd1) st <= (fifo_cnt != 3'd0) ? C_FIFO : C_ACK;
        end
        C_FIFO: if (rd && src_last_i[sel]) begin
          fifo_shr[0] <= fifo_shr[1];
          fifo_shr[1] <= fifo_shr[2];
          fifo_shr[2] <= fifo_shr[3];
          fifo_cnt    <= fifo_cnt - 1'b1;
          if (fifo_cnt == 3'd1) st <= C_ACK;
        end
        C_ACK: if (tx_ack_i) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
