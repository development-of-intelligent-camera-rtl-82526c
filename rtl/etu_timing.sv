// etu_timing: the EDICAM system time, a 64-bit count of 100 ns units (ETU).
//
// A modulus counter running on the ETU source clock etu_clk_i divides it by
// ETU_DIV and emits one registered pulse, one source-clock period wide, per
// 100 ns. The narrow enable synchroniser brings that pulse into the system
// clock domain, where it enables the 64-bit ETU counter for one cycle. The
// source clock may be any multiple of 10 MHz (ETU_DIV = f_src / 10 MHz, at
// least 2) and need not be related to sys_clk_i, but it must be known at
// compile time.
//
// clear_i sets the time to zero and load_i to load_val_i (clear wins). Both
// also restart the modulus counter and the synchroniser, so the new time
// holds for a full ETU before it first advances.
//
// Outputs: etu_o, the time; tick_o, a one-cycle pulse in the cycle before
// etu_o advances. The source frequency default (40 MHz, the Sensor Module's
// clk40 input) is this design's choice; the structure follows the document.
module etu_timing #(
  parameter int ETU_DIV = 4
) (
  input  logic                    sys_clk_i,
  input  logic                    rst_i,
  input  logic                    etu_clk_i,
  input  logic                    clear_i,
  input  logic                    load_i,
  input  logic [edicam_pkg::ETU_W-1:0] load_val_i,
  output logic [edicam_pkg::ETU_W-1:0] etu_o,
  output logic                    tick_o
);
  import edicam_pkg::*;

  localparam int MW = (ETU_DIV > 2) ? $clog2(ETU_DIV) : 1;

  // Restart request, one sys_clk cycle wide; resets the source-clock side.
  logic restart;
  logic mod_rst;
  always_ff @(posedge sys_clk_i) begin
    if (rst_i) restart <= 1'b0;
    else       restart <= clear_i | load_i;
  end
  assign mod_rst = rst_i | restart;

  // Modulus counter in the ETU source clock domain.
  logic [MW-1:0] mod_cnt;
  logic          en_src;
  always_ff @(posedge etu_clk_i or posedge mod_rst) begin
    if (mod_rst) begin
      mod_cnt <= '0;
      en_src  <= 1'b0;
    end else begin
      mod_cnt <= (mod_cnt == MW'(ETU_DIV - 1)) ? '0 : mod_cnt + 1'b1;
      en_src  <= (mod_cnt == MW'(ETU_DIV - 1));
    end
  end

  narrow_en_sync u_sync (
    .clk   (sys_clk_i),
    .rst   (mod_rst),
    .en_i  (en_src),
    .en_s_o(tick_o)
  );

  // ETU counter.
  always_ff @(posedge sys_clk_i) begin
    if (rst_i || clear_i) etu_o <= '0;
    else if (load_i)      etu_o <= load_val_i;
    else if (tick_o)      etu_o <= etu_o + 1'b1;
  end

  initial assert (ETU_DIV >= 2) else $fatal(1, "ETU_DIV must be at least 2");
endmodule
