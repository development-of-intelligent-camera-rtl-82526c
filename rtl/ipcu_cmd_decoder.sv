// ipcu_cmd_decoder: IPCU side command decoder. Reads the commands that
// link_rx has received from the Sensor Module and hands their contents on:
//   ROI_DATA  the three parameter QWs give the readout mode (ROIP id, mode
//             bits, first row, row count, sample time); when the command
//             carries image data, the mode is passed to the ROI data
//             processor (mode_valid_o/mode_ready_i) and the image QWs
//             follow on its 64-bit image interface (img_wr_o, held back
//             while img_full_i). The row descriptors and the error word
//             are read and not forwarded, except that roi_done_o reports
//             the ROI with its times and error bits to the host side.
//   STATUS    updates the Sensor Module state outputs (status_valid_o).
//   ACK       presents the acknowledge word (ack_valid_o).
// Anything else is read to its end and counted as unknown. A command
// whose CRC was wrong is still decoded, and counted in crc_err_cnt_o; a
// command with a length error is abandoned (link_rx discards it) and
// counted in len_err_cnt_o.
//
// Command layout (this design's, shared with smcg): header QW
// {opcode[63:56], id[55:48], 24'd0, length[23:0]}; length counts QWs
// including the header. A ROI_DATA command has image data when its
// length exceeds 5 + number of row descriptors.
//
// Timing: one QW per cycle while data are available and the destination
// has room. The document names this block's role (commands from the SM
// are decoded on the IPCU); its structure is this design's.
module ipcu_cmd_decoder (
  input  logic                      clk,
  input  logic                      rst,
  // link receiver data and control interface
  input  logic [63:0]               rx_data_i,
  input  logic                      rx_empty_i,
  output logic                      rx_rd_o,
  input  logic                      rx_cmd_end_i,
  input  logic                      rx_crc_error_i,
  input  logic                      rx_length_error_i,
  // RDP mode interface
  output logic                      mode_valid_o,
  output edicam_pkg::ro_mode_t      mode_o,
  input  logic                      mode_ready_i,
  // RDP image data 64 interface
  output logic                      img_wr_o,
  output logic [63:0]               img_data_o,
  input  logic                      img_full_i,
  // ROI report
  output logic                      roi_done_o,
  output logic [edicam_pkg::ID_W-1:0] roi_id_o,
  output edicam_pkg::etu_t          roi_sample_time_o,
  output edicam_pkg::etu_t          roi_exp_time_o,
  output logic                      roi_has_img_o,
  output logic [2:0]                roi_err_o,      // {scfw error, timeout, stopped}
  // Sensor Module status
  output logic                      status_valid_o,
  output edicam_pkg::exp_state_e    sm_exp_state_o,
  output edicam_pkg::ro_state_e     sm_ro_state_o,
  output logic [1:0]                sm_req_count_o,
  output edicam_pkg::etu_t          sm_exp_time_o,
  // acknowledge
  output logic                      ack_valid_o,
  output logic [63:0]               ack_word_o,
  // error counters
  output logic [15:0]               crc_err_cnt_o,
  output logic [15:0]               len_err_cnt_o,
  output logic [15:0]               unknown_cnt_o
);
  import edicam_pkg::*;

  typedef enum logic [2:0] {D_HDR, D_PAR, D_IMG, D_REST, D_STAT, D_ACK, D_SKIP} dstate_e;
  dstate_e st;
  logic [23:0] len;            // length of the command in QWs
  logic [23:0] img_left;
  logic [1:0]  idx;
  logic        has_img;
  logic [23:0] ndesc;

  // decode of the first parameter QW
  logic [63:29] p0;
  assign ndesc = rx_data_i[52] ? 24'(rx_data_i[51:40]) : 24'd1;

  logic can_rd;
  always_comb begin
    unique case (st)
      D_PAR:   can_rd = !(idx == 2'd1 && has_img && !mode_ready_i);
      D_IMG:   can_rd = !img_full_i;
      default: can_rd = 1'b1;
    endcase
  end
  assign rx_rd_o    = !rx_empty_i && can_rd;
  assign img_wr_o   = rx_rd_o && st == D_IMG;
  assign img_data_o = rx_data_i;

  always_comb begin
    mode_o = '0;
    mode_o.roip_id     = p0[63:56];
    mode_o.immediate   = p0[55];
    mode_o.persistent  = p0[54];
    mode_o.triggered   = p0[53];
    mode_o.arbitrary   = p0[52];
    mode_o.nrows       = p0[51:40];
    mode_o.y0          = p0[39:29];
    mode_o.sample_time = rx_data_i;
  end
  assign mode_valid_o = rx_rd_o && st == D_PAR && idx == 2'd1 && has_img;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= D_HDR; len <= '0; img_left <= '0; idx <= '0; 
      has_img <= 1'b0; p0 <= '0;
      roi_done_o <= 1'b0; roi_id_o <= '0; roi_sample_time_o <= '0; roi_exp_time_o <= '0;
      roi_has_img_o <= 1'b0; roi_err_o <= '0;
      status_valid_o <= 1'b0; sm_exp_state_o <= EXP_IDLE; sm_ro_state_o <= RO_IDLE;
      sm_req_count_o <= '0; sm_exp_time_o <= '0;
      ack_valid_o <= 1'b0; ack_word_o <= '0;
      crc_err_cnt_o <= '0; len_err_cnt_o <= '0; unknown_cnt_o <= '0;
    end else begin
      roi_done_o <= 1'b0; status_valid_o <= 1'b0; ack_valid_o <= 1'b0;
      if (rx_crc_error_i && !rx_length_error_i && rx_cmd_end_i) crc_err_cnt_o <= crc_err_cnt_o + 1'b1;
      if (rx_length_error_i) begin
        len_err_cnt_o <= len_err_cnt_o + 1'b1;
        st <= D_HDR;
      end else if (rx_rd_o) begin
        unique case (st)
          D_HDR: begin
            len  <= rx_data_i[23:0];
            idx  <= '0;
            unique case (rx_data_i[63:56])
              OP_ROI_DATA: st <= D_PAR;
              OP_STATUS:   st <= D_STAT;
              OP_ACK:      st <= D_ACK;
              default: begin
                unknown_cnt_o <= unknown_cnt_o + 1'b1;
                st <= D_SKIP;
              end
            endcase
            if (rx_cmd_end_i) st <= D_HDR;
          end
          D_PAR: begin
            idx <= idx + 1'b1;
            unique case (idx)
              2'd0: begin
                p0       <= rx_data_i[63:29];
                has_img  <= len > 24'd5 + ndesc;
                img_left <= len - 24'd5 - ndesc;
              end
              2'd1: roi_sample_time_o <= rx_data_i;
              default: begin
                roi_exp_time_o <= rx_data_i;
                st <= has_img ? D_IMG : D_REST;
              end
            endcase
          end
          D_IMG: begin
            img_left <= img_left - 1'b1;
            if (img_left == 24'd1) st <= D_REST;
          end
          D_REST: if (rx_cmd_end_i) begin
            roi_done_o    <= 1'b1;
            roi_id_o      <= p0[63:56];
            roi_has_img_o <= has_img;
            roi_err_o     <= rx_data_i[2:0];
            st <= D_HDR;
          end
          D_STAT: begin
            idx <= idx + 1'b1;
            if (idx == 2'd0) begin
              sm_exp_state_o <= exp_state_e'(rx_data_i[1:0]);
              sm_ro_state_o  <= ro_state_e'(rx_data_i[3:2]);
              sm_req_count_o <= rx_data_i[5:4];
            end else begin
              sm_exp_time_o  <= rx_data_i;
              status_valid_o <= 1'b1;
            end
          end
          D_ACK: begin
            ack_word_o  <= rx_data_i;
            ack_valid_o <= 1'b1;
          end
          default: ;
        endcase
        if (st != D_HDR && rx_cmd_end_i) st <= D_HDR;
      end
    end
  end
endmodule
