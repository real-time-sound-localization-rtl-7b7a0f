// tb_localization_experiments: the room experiments of the original design,
// re-created with synthetic signals on the full-size localizer.
//
// Geometry: two microphones 0.4 m apart on a wall, the talker 2 m in front
// of the wall, at the microphones' height; speed of sound 345 m/s, 20 kHz
// sampling, 1024-sample (51.2 ms) segments. For a talker at lateral position
// x (metres, microphone 1 at x = 0, microphone 2 at x = 0.4) the true delay
// is (sqrt((x-0.4)^2 + 4) - sqrt(x^2 + 4)) / 345 * 20000 samples, which is
// fractional in general.
//
// Talker: "speech" is replaced by 200 sinusoids of random frequency between
// 100 Hz and 5 kHz and random phase, evaluated in continuous time so that
// the fractional delay is exact. Noise: at 30 dB only independent sensor
// noise; at 20, 10 and 0 dB a far-field Gaussian noise source scaled to
// that SNR, plus the sensor noise. The noise source lies 40 degrees off the
// array's axis on microphone 1's side, so it reaches microphone 2 15
// samples later. The noise direction and the signal model are this
// testbench's own choices.
//
// Runs (samples every 64 clocks, so the pipeline still keeps up):
//   stationary talker at x = -0.5 m, 30 dB: PHAT and UCC, 4 segments each;
//   moving talker from x = -0.5 m to x = +0.9 m in 6 steps, PHAT, at 30, 20,
//   10 and 0 dB.
// Checks: at 30 and 20 dB every PHAT estimate is within one sample of the
// true delay; at 10 dB at least 5 of the 6. At 0 dB and for UCC the results
// are only reported: the original design reports that localization fails at
// 0 dB and that PHAT is the more accurate weighting. The direction-of-arrival
// error, asin(v*tau/d) against the truth, is printed for each estimate.
module tb_localization_experiments;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0;
  logic [23:0] ch1_sample = '0, ch2_sample = '0;
  logic [1:0] seg_sel = 2'd2;
  logic phat_en = 1'b1, smooth_en = 1'b0;
  logic signed [7:0] tdoa;
  logic [63:0] tdoa_score;
  logic tdoa_valid, tdoa_smoothed, overrun, stall;

  sound_localizer dut (.*);

  localparam real PI = 3.14159265358979323846;
  localparam real FS = 20000.0;
  localparam real V  = 345.0;
  localparam real D  = 0.4;
  localparam int  NT = 200;
  localparam int  NOISE_DELAY = 15;   // samples, microphone 2 later

  real tone_f [NT], tone_p [NT];
  real noise_hist [64];
  longint gidx = 0;
  int checks = 0, failures = 0;
  int est [$];

  always #5 clk = ~clk;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && tdoa_valid) est.push_back(int'(tdoa));

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1))) / 1000001.0;
    u2 = (real'($urandom_range(1000000, 0))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic real talker(input real t);   // t in samples
    real s;
    s = 0.0;
    for (int i = 0; i < NT; i++) s += 2.0 * $cos(2.0 * PI * tone_f[i] * t / FS + tone_p[i]);
    return s;                                     // rms about 20 of 128
  endfunction

  function automatic int q8(input real v);
    int r;
    r = $rtoi(v + (v < 0.0 ? -0.5 : 0.5));
    return r > 127 ? 127 : (r < -128 ? -128 : r);
  endfunction

  function automatic real true_delay(input real x);
    return ($sqrt((x - 0.4) * (x - 0.4) + 4.0) - $sqrt(x * x + 4.0)) / V * FS;
  endfunction

  function automatic real doa_deg(input real tau);
    real a;
    a = V * tau / FS / D;
    if (a > 1.0) a = 1.0;
    if (a < -1.0) a = -1.0;
    return $asin(a) * 180.0 / PI;
  endfunction

  // one 1024-sample segment of a talker with delay tau at the given SNR
  task automatic segment(input real tau, input real snr_db, input bit ext_noise);
    real sig_rms, n_rms, s1, s2, nz;
    sig_rms = 20.0;
    n_rms = sig_rms / $pow(10.0, snr_db / 20.0);
    for (int n = 0; n < 1024; n++) begin
      s1 = talker(real'(gidx));
      s2 = talker(real'(gidx) - tau);
      if (ext_noise) begin
        nz = n_rms * gauss();
        noise_hist[gidx % 64] = nz;
        s1 += nz;
        s2 += noise_hist[(gidx + 64 - NOISE_DELAY) % 64];
        s1 += 0.6 * gauss();
        s2 += 0.6 * gauss();
      end else begin
        s1 += n_rms * gauss();
        s2 += n_rms * gauss();
      end
      gidx++;
      @(negedge clk);
      sample_valid = 1'b1;
      ch1_sample = {8'(q8(s1)), 16'h0000};
      ch2_sample = {8'(q8(s2)), 16'h0000};
      @(negedge clk);
      sample_valid = 1'b0;
      repeat (62) @(negedge clk);
    end
  endtask

  task automatic drain();
    repeat (70000) @(negedge clk);
  endtask

  // run segments at the given positions; returns how many estimates were
  // within one sample of the truth
  task automatic run(input string name, input real xs [], input real snr_db,
                     input bit ext_noise, output int good, output int total);
    real taus [$];
    int e;
    est.delete();
    foreach (xs[i]) begin
      taus.push_back(true_delay(xs[i]));
      segment(true_delay(xs[i]), snr_db, ext_noise);
    end
    drain();
    good = 0; total = est.size();
    for (int i = 0; i < est.size() && i < taus.size(); i++) begin
      e = est[i];
      if (real'(e) - taus[i] <= 1.0 && taus[i] - real'(e) <= 1.0) good++;
      $display("%s: x=%5.2f m true %6.2f samples (%6.1f deg), estimate %0d (%6.1f deg), DOA error %6.1f deg",
               name, xs[i], taus[i], doa_deg(taus[i]), e, doa_deg(real'(e)),
               doa_deg(real'(e)) - doa_deg(taus[i]));
    end
    $display("%s: %0d of %0d estimates within one sample", name, good, total);
  endtask

  initial begin
    int g, t;
    real stat [] = '{-0.5, -0.5, -0.5, -0.5};
    real mov [] = '{-0.5, -0.22, 0.06, 0.34, 0.62, 0.9};
    for (int i = 0; i < NT; i++) begin
      tone_f[i] = 100.0 + 4900.0 * real'($urandom_range(100000)) / 100000.0;
      tone_p[i] = 2.0 * PI * real'($urandom_range(100000)) / 100000.0;
    end
    foreach (noise_hist[i]) noise_hist[i] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    phat_en = 1'b1;
    run("stationary 30dB PHAT", stat, 30.0, 1'b0, g, t);
    checks++; if (g != 4 || t != 4) failures++;
    phat_en = 1'b0;
    run("stationary 30dB UCC", stat, 30.0, 1'b0, g, t);
    checks++; if (t != 4) failures++;
    phat_en = 1'b1;
    run("moving 30dB", mov, 30.0, 1'b0, g, t);
    checks++; if (g != 6 || t != 6) failures++;
    run("moving 20dB", mov, 20.0, 1'b1, g, t);
    checks++; if (g != 6 || t != 6) failures++;
    run("moving 10dB", mov, 10.0, 1'b1, g, t);
    checks++; if (g < 5 || t != 6) failures++;
    run("moving 0dB", mov, 0.0, 1'b1, g, t);
    checks++; if (t != 6) failures++;
    checks++; if (overrun || dut.u_est.u_gcc.busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
