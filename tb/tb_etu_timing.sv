// tb_etu_timing: 100 MHz system clock, 40 MHz ETU source clock (ETU_DIV 4,
// the default). Checks the rate (one ETU per 100 ns), single-cycle ticks,
// clear and load, and that a loaded time holds for about one ETU.
module tb_etu_timing;
  timeunit 1ns; timeprecision 1ps;
  import edicam_pkg::*;
  logic clk = 0, eclk = 0, rst = 1, clear = 0, load = 0, tick;
  etu_t val = '0, etu;
  always #5 clk = ~clk;          // 100 MHz
  always #12.5 eclk = ~eclk;     // 40 MHz

  etu_timing dut (.sys_clk_i(clk), .rst_i(rst), .etu_clk_i(eclk), .clear_i(clear), .load_i(load),
    .load_val_i(val), .etu_o(etu), .tick_o(tick));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (etu=%0d)", what, etu); end
  endtask

  int ticks = 0, double_ticks = 0; logic tick_q = 0;
  always @(posedge clk) begin
    tick_q <= tick;
    if (tick) ticks++;
    if (tick && tick_q) double_ticks++;
  end

  initial begin
    etu_t e0; int t0, hold;
    repeat (5) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    e0 = etu;
    repeat (1000) @(negedge clk);           // 10 us = 100 ETU
    check(etu - e0 >= 99 && etu - e0 <= 101, "100 ETU in 10 us");
    check(double_ticks == 0, "tick is one cycle wide");
    val = 64'h0000_0001_0000_0000;
    load = 1; @(negedge clk); load = 0;
    check(etu == val, "load sets the time");
    hold = 0;
    while (etu == val && hold < 30) begin @(negedge clk); hold++; end
    check(hold >= 8 && hold <= 13, $sformatf("loaded time holds one ETU (%0d cycles)", hold));
    check(etu == val + 1, "counts on from the loaded value");
    repeat (37) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    check(etu == 0, "clear sets zero");
    repeat (500) @(negedge clk);
    check(etu >= 49 && etu <= 50, "counts from zero after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
