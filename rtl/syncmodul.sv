// syncmodul: the interface synchroniser between the SM logic (clk, 100 MHz)
// and the control and ROI parameter interfaces of the sensor control
// firmware, which run on the firmware's fixed 40 MHz clock (sclk). Towards
// the SM logic it behaves like the firmware itself, only in the faster
// domain.
//
// Two parts, as in the document:
//   * Command sync: the ROI parameter FIFO interface is carried by a
//     dual-clock FIFO. Glue logic on the firmware side moves the oldest
//     rectangle into the firmware's parameter port whenever the port is not
//     full (one write per sclk cycle); par_full_o is the FIFO's full flag.
//   * Single-bit lines: exposure (SM -> firmware) and busy (firmware -> SM)
//     are levels and pass through base synchronisers (two flip-flops).
//     sample is a one-cycle SM pulse, narrower than an sclk period, and
//     passes through the narrow enable synchroniser, which gives one sclk
//     cycle pulse.
//
// busy glue (this design's choice): the SM readout controller expects busy
// to be high as soon as it has handed over ROI parameters, and counts its
// falling edges. The synchronised busy lags by several SM cycles, so
// busy_o is held high from each accepted parameter word until the
// synchronised busy has been seen high, which keeps the SM side from
// reading an idle firmware too early.
//
// Timing: a parameter word reaches the firmware port 3 to 5 sclk cycles
// after it was written; sample reaches it 3 to 4 sclk cycles after the SM
// pulse; busy reaches the SM 2 SM cycles after it changes. The sample pulse
// is registered in the SM domain first so that the enable synchroniser,
// whose first flip-flop is clocked by the pulse, sees a clean edge.
// FIFO depth (2**PAR_AW) is not given in the document and is assumed.
module syncmodul #(
  parameter int PAR_AW = 3
) (
  // SM side
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  par_wr_i,
  input  edicam_pkg::scfw_roi_t par_data_i,
  output logic                  par_full_o,
  input  logic                  sample_i,
  input  logic                  exposure_i,
  output logic                  busy_o,
  // firmware side
  input  logic                  sclk,
  input  logic                  srst,
  output logic                  scfw_par_wr_o,
  output edicam_pkg::scfw_roi_t scfw_par_data_o,
  input  logic                  scfw_par_full_i,
  output logic                  scfw_sample_o,
  output logic                  scfw_exposure_o,
  input  logic                  scfw_busy_i
);
  import edicam_pkg::*;

  // Command sync
  logic par_empty;
  async_fifo #(.W($bits(scfw_roi_t)), .AW(PAR_AW)) u_par_fifo (
    .wclk(clk), .wrst(rst), .wr_i(par_wr_i), .wdata_i(par_data_i), .full_o(par_full_o),
    .rclk(sclk), .rrst(srst), .rd_i(scfw_par_wr_o), .rdata_o(scfw_par_data_o),
    .empty_o(par_empty));
  assign scfw_par_wr_o = !par_empty && !scfw_par_full_i;

  // sample: register in the SM domain, then the enable synchroniser
  logic sample_q;
  always_ff @(posedge clk) begin
    if (rst) sample_q <= 1'b0;
    else     sample_q <= sample_i;
  end
  narrow_en_sync u_sample_sync (.clk(sclk), .rst(srst), .en_i(sample_q), .en_s_o(scfw_sample_o));

  // level lines
  base_sync #(.W(1)) u_exp_sync  (.clk(sclk), .rst(srst), .d_i(exposure_i),  .q_o(scfw_exposure_o));
  logic busy_s;
  base_sync #(.W(1)) u_busy_sync (.clk,       .rst,       .d_i(scfw_busy_i), .q_o(busy_s));

  // busy glue: pending from an accepted parameter word until busy is seen
  logic pending;
  always_ff @(posedge clk) begin
    if (rst)                              pending <= 1'b0;
    else if (par_wr_i && !par_full_o)     pending <= 1'b1;
    else if (busy_s)                      pending <= 1'b0;
  end
  assign busy_o = busy_s || pending;
endmodule
