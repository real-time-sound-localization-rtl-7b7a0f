// tb_sound_localizer: end-to-end test of the whole localizer at its full
// size (1024-sample segments, 256 GCC bins, lags -30..30).
//
// A white-noise source is heard by both microphones, by one of them D
// samples later, each with its own independent noise (about 24 dB SNR). The
// 8-bit values sit in the top byte of the 24-bit ADC words; the low 16 bits
// are random and must be ignored. The test runs in phases, each with one
// delay, segment length, weighting and sample rate, and checks every
// estimate of the phase against D:
//   1. 1024-sample segments at the real rate (one sample every 500 clocks:
//      20 kHz at 10 MHz), PHAT: no overrun, and each estimate arrives
//      within the real-time budget after its segment ends;
//   2. the same with temporal smoothing on;
//   3. switch to 256-sample segments and UCC weighting, with a negative
//      delay; the first estimate after the length change is not smoothed;
//   4. a 1024-sample segment followed closely by a 256-sample one, so that
//      stage 2 finishes the short segment while stage 3 is still searching:
//      stall;
//   5. samples every 4 clocks: segments arrive faster than stage 2 and are
//      dropped: overrun.
// Each mechanism (smoothing, PHAT, UCC, each length, stall, overrun) is
// counted and must happen at least once.
module tb_sound_localizer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0;
  logic [23:0] ch1_sample = '0, ch2_sample = '0;
  logic [1:0] seg_sel = 2'd2;
  logic phat_en = 1'b1, smooth_en = 1'b0;
  logic signed [7:0] tdoa;
  logic [63:0] tdoa_score;
  logic tdoa_valid, tdoa_smoothed, overrun, stall;

  sound_localizer dut (.*);

  int checks = 0, failures = 0;
  int n_overrun = 0, n_stall = 0, n_smoothed = 0, n_phat = 0, n_ucc = 0;
  int n_len [3] = '{0, 0, 0};
  longint cyc = 0, last_end = 0;
  int src [128];
  int gidx = 0;
  int cur_d = 0;

  // results of the running phase
  int r_tdoa [$];
  bit r_smooth [$];
  longint r_lat [$];

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (overrun) n_overrun++;
      if (stall) n_stall++;
      if (tdoa_valid) begin
        r_tdoa.push_back(int'(tdoa));
        r_smooth.push_back(tdoa_smoothed);
        r_lat.push_back(cyc - last_end);
        if (tdoa_smoothed) n_smoothed++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int clip8(input int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  // one sample pair, then (period - 1) idle clocks
  task automatic send(input int period);
    int a, b;
    src[gidx % 128] = int'($urandom_range(180)) - 90;
    a = src[(gidx - (cur_d < 0 ? -cur_d : 0) + 128) % 128];
    b = src[(gidx - (cur_d > 0 ? cur_d : 0) + 128) % 128];
    a = clip8(a + int'($urandom_range(10)) - 5);
    b = clip8(b + int'($urandom_range(10)) - 5);
    gidx++;
    @(negedge clk);
    sample_valid = 1'b1;
    ch1_sample = {8'(a), 16'($urandom())};
    ch2_sample = {8'(b), 16'($urandom())};
    @(negedge clk);
    sample_valid = 1'b0;
    last_end = cyc;
    repeat (period - 2) @(negedge clk);
  endtask

  task automatic segment(input int lg, input int period);
    seg_sel = (lg == 8) ? 2'd0 : (lg == 9) ? 2'd1 : 2'd2;
    for (int n = 0; n < (1 << lg); n++) send(period);
  endtask

  // check the results of a phase; first_unsmoothed: the first must not be
  // smoothed; max_lat: latency bound (0: none)
  task automatic close_phase(input string name, input int min_results,
                             input bit first_unsmoothed, input longint max_lat);
    repeat (70000) @(negedge clk);
    check(r_tdoa.size() >= min_results,
          $sformatf("%s: %0d estimates, expected at least %0d", name, r_tdoa.size(), min_results));
    for (int i = 0; i < r_tdoa.size(); i++) begin
      check(r_tdoa[i] == cur_d, $sformatf("%s: estimate %0d is %0d, delay %0d", name, i, r_tdoa[i], cur_d));
      if (phat_en) n_phat++; else n_ucc++;
      if (seg_sel == 2'd0) n_len[0]++; else if (seg_sel == 2'd1) n_len[1]++; else n_len[2]++;
    end
    if (max_lat > 0)
      for (int i = 0; i < r_lat.size(); i++)
        check(r_lat[i] <= max_lat, $sformatf("%s: latency %0d clocks", name, r_lat[i]));
    if (first_unsmoothed && r_smooth.size() > 0)
      check(!r_smooth[0], $sformatf("%s: first estimate smoothed", name));
    $display("%s: %0d estimates", name, r_tdoa.size());
    r_tdoa.delete(); r_smooth.delete(); r_lat.delete();
  endtask

  initial begin
    int ov0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. real rate, PHAT, 1024 samples
    cur_d = 9; phat_en = 1'b1; smooth_en = 1'b0;
    for (int s = 0; s < 3; s++) segment(10, 500);
    check(n_overrun == 0, "no overrun at the real sample rate");
    close_phase("real-rate PHAT", 3, 1'b0, 64000);

    // 2. smoothing
    smooth_en = 1'b1;
    for (int s = 0; s < 2; s++) segment(10, 500);
    close_phase("smoothed", 2, 1'b0, 64000);
    check(n_smoothed >= 2, "smoothed estimates");

    // 3. 256-sample segments, UCC, negative delay
    cur_d = -6; phat_en = 1'b0;
    for (int s = 0; s < 4; s++) segment(8, 60);
    close_phase("256 UCC", 4, 1'b1, 0);

    // 4. stall: a long segment, then a short one ending just after the
    //    long one leaves stage 2
    cur_d = 14; phat_en = 1'b1; smooth_en = 1'b0;
    segment(10, 20);
    seg_sel = 2'd0;
    for (int n = 0; n < 255; n++) send(20);
    wait (dut.u_proc1.done);
    repeat (500) @(negedge clk);
    send(2);
    close_phase("stall", 2, 1'b0, 0);

    // 5. overrun: samples every 4 clocks
    cur_d = -21; ov0 = n_overrun;
    for (int s = 0; s < 6; s++) segment(8, 4);
    close_phase("overrun", 1, 1'b0, 0);
    check(n_overrun > ov0, "overrun");

    $display("mechanisms: overrun=%0d stall=%0d smoothed=%0d phat=%0d ucc=%0d len256=%0d len1024=%0d",
             n_overrun, n_stall, n_smoothed, n_phat, n_ucc, n_len[0], n_len[2]);
    check(n_stall > 0, "stall happened");
    check(n_phat > 0 && n_ucc > 0, "both weightings used");
    check(n_len[0] > 0 && n_len[2] > 0, "both lengths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
