// tb_syncmodul: self-checking test of the SM / firmware interface
// synchroniser, with the SM clock at 100 MHz and the firmware clock at
// 40 MHz as in the camera.
//
// Checks: 40 random ROI rectangles written with random gaps arrive at the
// firmware port intact and in order while the port is randomly full; the
// first one arrives within 5 firmware cycles; with the port held full the
// FIFO fills after 8 words and refuses a ninth; each one-cycle sample
// pulse gives exactly one one-cycle firmware pulse within 2 to 5 firmware
// cycles; exposure follows within 3 firmware cycles; busy reaches the SM
// within 3 SM cycles and busy_o stays high between a parameter write and
// the firmware's busy.
module tb_syncmodul;
  import edicam_pkg::*;

  logic clk = 0, sclk = 0, rst = 1, srst = 1;
  always #5    clk  = ~clk;
  always #12.5 sclk = ~sclk;

  logic par_wr = 0, par_full, sample = 0, exposure = 0, busy;
  scfw_roi_t par_data = '0, s_data;
  logic s_wr, s_full = 0, s_sample, s_exposure, s_busy = 0;

  syncmodul dut (.clk, .rst, .par_wr_i(par_wr), .par_data_i(par_data), .par_full_o(par_full),
    .sample_i(sample), .exposure_i(exposure), .busy_o(busy),
    .sclk, .srst, .scfw_par_wr_o(s_wr), .scfw_par_data_o(s_data), .scfw_par_full_i(s_full),
    .scfw_sample_o(s_sample), .scfw_exposure_o(s_exposure), .scfw_busy_i(s_busy));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // firmware side monitors
  scfw_roi_t got[$];
  int scyc = 0, first_at = -1, spulses = 0, spulse_at = -1, s_long = 0;
  logic s_sample_q = 0;
  always @(posedge sclk) begin
    scyc++;
    if (!srst) begin
      if (s_wr) begin got.push_back(s_data); if (first_at < 0) first_at = scyc; end
      if (s_sample) begin spulses++; spulse_at = scyc; if (s_sample_q) s_long++; end
      s_sample_q <= s_sample;
    end
  end

  // firmware busy for two cycles, then wait until the SM side sees idle
  task automatic fw_busy_pulse();
    @(negedge sclk); s_busy = 1;
    repeat (2) @(negedge sclk); s_busy = 0;
    repeat (4) @(negedge clk);
  endtask

  function automatic scfw_roi_t rnd_roi();
    scfw_roi_t r;
    r = scfw_roi_t'({$urandom, $urandom});
    return r;
  endfunction

  initial begin
    scfw_roi_t sent[$];
    int t0, ok, n;
    repeat (4) @(posedge sclk);
    @(negedge clk); rst = 0; @(negedge sclk); srst = 0;
    repeat (3) @(negedge clk);

    // 1. single word latency
    t0 = scyc;
    par_data = rnd_roi(); sent.push_back(par_data); par_wr = 1;
    @(negedge clk); par_wr = 0;
    check(busy, "busy_o held high after a parameter write");
    repeat (10) @(negedge sclk);
    check(first_at > 0 && first_at - t0 <= 5, $sformatf("first word after %0d firmware cycles", first_at - t0));
    check(busy, "busy_o still held while the firmware has not been busy");
    fw_busy_pulse();
    check(!busy, "busy_o released after the firmware's busy");

    // 2. random stream with random firmware back-pressure
    fork
      begin
        n = 0;
        while (n < 40) begin
          @(negedge clk);
          if (!par_full && ($urandom % 3 == 0)) begin
            par_data = rnd_roi(); sent.push_back(par_data); par_wr = 1; n++;
          end else par_wr = 0;
        end
        @(negedge clk); par_wr = 0;
      end
      begin
        repeat (400) begin @(negedge sclk); s_full = ($urandom % 2 == 0); end
        s_full = 0;
      end
    join
    repeat (20) @(negedge sclk);
    ok = (got.size() == sent.size());
    for (int i = 0; i < got.size() && i < sent.size(); i++) if (got[i] != sent[i]) ok = 0;
    check(ok, $sformatf("all %0d rectangles delivered in order (got %0d)", sent.size(), got.size()));

    // 3. full flag with the firmware port held full
    s_full = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); par_wr = !par_full; par_data = rnd_roi();
    end
    @(negedge clk); par_wr = 0;
    repeat (3) @(negedge clk);
    check(par_full, "FIFO full after 8 words");
    n = got.size();
    s_full = 0;
    repeat (30) @(negedge sclk);
    check(got.size() == n + 8, "8 queued words delivered once the port frees");
    check(!par_full, "full cleared after draining");
    fw_busy_pulse();

    // 4. sample pulses
    n = spulses;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); sample = 1; t0 = scyc;
      @(negedge clk); sample = 0;
      repeat (12) @(negedge sclk);
      check(spulse_at - t0 >= 2 && spulse_at - t0 <= 5,
            $sformatf("sample pulse %0d after %0d firmware cycles", i, spulse_at - t0));
    end
    check(spulses == n + 5, "one firmware sample per SM sample");
    check(s_long == 0, "firmware sample pulses last one cycle");

    // 5. exposure level
    @(negedge clk); exposure = 1; t0 = scyc;
    repeat (3) @(negedge sclk);
    check(s_exposure, "exposure reaches the firmware within 3 cycles");
    @(negedge clk); exposure = 0;
    repeat (3) @(negedge sclk);
    check(!s_exposure, "exposure end reaches the firmware");

    // 6. busy towards the SM
    @(negedge sclk); s_busy = 1;
    repeat (3) @(negedge clk);
    check(busy, "busy reaches the SM within 3 cycles");
    @(negedge sclk); s_busy = 0;
    repeat (3) @(negedge clk);
    check(!busy, "busy end reaches the SM");

    // 7. busy glue: write a word, firmware rises busy late
    @(negedge clk); par_data = rnd_roi(); par_wr = 1;
    @(negedge clk); par_wr = 0;
    ok = 1;
    repeat (30) begin @(negedge clk); if (!busy) ok = 0; end
    check(ok, "busy_o stays high until the firmware's busy");
    @(negedge sclk); s_busy = 1;
    repeat (4) @(negedge sclk); s_busy = 0;
    repeat (4) @(negedge clk);
    check(!busy, "busy_o falls after the firmware's busy ends");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
