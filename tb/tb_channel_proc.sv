// tb_channel_proc: self-checking test of stage 2 (window, FFT, CORDIC
// magnitude/phase) for one channel.
//
// A model of the channel buffer read port (one clock latency) holds a test
// segment: two tones plus random noise, 8-bit. For L = 1024, 256 and 512 the
// testbench computes the expected spectrum itself: the windowed samples as
// fractions of full scale (same window formula), then a direct DFT in real
// arithmetic. Every bin written to the GCC port is decoded and compared:
// magnitude within 1 % plus 0.3 % of the largest bin (the rounding noise of
// 16-bit floating point spreads over the whole spectrum), phase, for bins
// above 5 % of the largest, within 0.004*max/|X| + 0.01 rad. It also checks that
// each bin 0..min(256, L/2+1)-1 is written exactly once, that done pulses
// once, and that the job ends within the real-time budget of one segment
// (L * 500 clocks: 10 MHz clock, 20 kHz sampling) and within the expected
// schedule.
module tb_channel_proc
  import sl_pkg::*;
  import fp16_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [3:0] seg_log2 = 4'd10;
  logic busy, done;
  logic [9:0] cb_rd_addr;
  logic [7:0] cb_rd_data;
  logic gw_en;
  logic [7:0] gw_addr;
  magph_t gw_data;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  logic signed [7:0] cbuf [1024];
  real xr [1024];
  int  written [256];
  real exp_mag [256], exp_ph [256];

  channel_proc dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cb_rd_data <= cbuf[cb_rd_addr];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic real wrapr(input real a);
    while (a > PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  task automatic run_len(input int lg, input real f1, input real f2);
    int len, nb, cycles, w, dones;
    real re, im, ang, m, gp, ph_err, mx, gm;
    len = 1 << lg;
    nb = (len / 2 + 1 > 256) ? 256 : len / 2 + 1;
    for (int k = 0; k < 256; k++) written[k] = 0;
    for (int n = 0; n < len; n++) begin
      int s;
      s = $rtoi(60.0 * $cos(2.0 * PI * f1 * n / len + 0.7) + 30.0 * $sin(2.0 * PI * f2 * n / len))
          + int'($urandom_range(16)) - 8;
      cbuf[n] = 8'(s);
      w = $rtoi(32767.0 * 0.5 * (1.0 - $cos(2.0 * PI * n / len)) + 0.5);
      xr[n] = real'(s) * real'(w) / 128.0 / 32768.0;
    end
    mx = 0.0;
    for (int k = 0; k < nb; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < len; n++) begin
        ang = -2.0 * PI * ((k * n) % len) / len;
        re += xr[n] * $cos(ang);
        im += xr[n] * $sin(ang);
      end
      exp_mag[k] = $sqrt(re * re + im * im);
      exp_ph[k]  = $atan2(im, re);
      if (exp_mag[k] > mx) mx = exp_mag[k];
    end
    @(negedge clk);
    seg_log2 = 4'(lg); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; dones = 0;
    while (!done) begin
      if (gw_en) begin
        written[gw_addr]++;
        m = exp_mag[gw_addr];
        gm = (gw_data.mag[14:10] == '0) ? 0.0
             : (1.0 + real'(gw_data.mag[9:0]) / 1024.0)
               * $pow(2.0, real'(int'(gw_data.mag[14:10]) - 15));
        check(gw_data.mag[15] == 1'b0 && gm - m < 0.01 * m + 0.003 * mx
              && m - gm < 0.01 * m + 0.003 * mx,
              $sformatf("L=%0d bin %0d mag %g exp %g", len, gw_addr, gm, m));
        if (m > 0.05 * mx) begin
          gp = real'($signed(gw_data.phase)) * 2.0 * PI / 65536.0;
          ph_err = wrapr(gp - exp_ph[gw_addr]);
          check(ph_err < 0.004 * mx / m + 0.01 && -ph_err < 0.004 * mx / m + 0.01,
                $sformatf("L=%0d bin %0d phase %f exp %f", len, gw_addr, gp, exp_ph[gw_addr]));
        end
      end
      @(negedge clk);
      cycles++;
    end
    for (int k = 0; k < 256; k++)
      check(written[k] == (k < nb ? 1 : 0), $sformatf("bin %0d written %0d times", k, written[k]));
    $display("L=%0d stage-2 time %0d clocks", len, cycles);
    check(cycles < len * 500, "within one segment time");
    // schedule: load + (L-1) twiddles + L/2*log2(L) butterflies + bins
    check(cycles <= len + (len - 1) * 21 + len / 2 * lg * 4 + nb * 21 + 10,
          $sformatf("schedule %0d clocks", cycles));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_len(10, 37.0, 100.5);
    run_len(8, 11.0, 40.25);
    run_len(9, 70.0, 200.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
