// tb_narrow_en_sync: sends narrow (2 ns) and wide (60 ns) enable pulses
// from an unrelated domain into a 100 MHz domain and checks that each gives
// exactly one output pulse of one clock, 2 to 4 cycles later.
module tb_narrow_en_sync;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, en = 0, en_s;
  always #5 clk = ~clk;

  narrow_en_sync dut (.clk, .rst, .en_i(en), .en_s_o(en_s));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int npulse = 0, wide = 0;
  logic en_s_q = 0;
  always @(posedge clk) begin
    en_s_q <= en_s;
    if (en_s) npulse++;
    if (en_s && en_s_q) wide++;
  end

  initial begin
    int n_before, lat;
    #23 rst = 0;
    for (int i = 0; i < 20; i++) begin
      #(37 + 3 * i);
      n_before = npulse;
      en = 1; #((i % 2) ? 60 : 2); en = 0;
      lat = 0;
      while (npulse == n_before && lat < 10) begin @(posedge clk); #1; lat++; end
      check(npulse == n_before + 1 && lat <= 5, $sformatf("pulse %0d received once", i));
      repeat (4) @(posedge clk);
      check(npulse == n_before + 1, "no extra pulse");
    end
    check(wide == 0, "output pulses are one cycle wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
