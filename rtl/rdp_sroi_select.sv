// rdp_sroi_select: picks the sROI bound to a ROIP id.
//
// Each of the N_SROI table entries is compared with roip_id_i; a binary
// encoder turns the match lines into the select of the boundary
// multiplexer (the lowest matching entry wins). Without a match the second
// multiplexer passes the full image (0..2047 in both directions), so the
// whole ROI is processed. Purely combinational, as in the document.
module rdp_sroi_select #(
  parameter int N_SROI = 8
) (
  input  logic [edicam_pkg::ID_W-1:0] roip_id_i,
  input  edicam_pkg::sroi_t           table_i [N_SROI],
  output edicam_pkg::sroi_t           sel_o
);
  import edicam_pkg::*;
  logic [N_SROI-1:0] match;
  localparam int IW = (N_SROI > 1) ? $clog2(N_SROI) : 1;
  logic [IW-1:0] idx;
  logic any;

  always_comb begin
    for (int i = 0; i < N_SROI; i++) match[i] = table_i[i].valid && table_i[i].roip_id == roip_id_i;
    any = |match;
    idx = '0;
    for (int i = N_SROI - 1; i >= 0; i--) if (match[i]) idx = IW'(i);
    if (any) sel_o = table_i[idx];
    else begin
      sel_o = '0;
      sel_o.valid = 1'b1; sel_o.roip_id = roip_id_i;
      sel_o.x1 = '1; sel_o.y1 = '1;
    end
  end
endmodule
