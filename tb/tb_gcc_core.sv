// tb_gcc_core: self-checking test of the GCC lag search.
//
// Four buffer models (current and previous spectra of both channels, one
// clock read latency) are filled with synthetic spectra: channel 2's phase is
// channel 1's phase minus 2*pi*k*D/L (a delay of D samples) plus phase noise,
// with a share of bins replaced by random phase; magnitudes are random. The
// testbench computes the score of every lag itself in real arithmetic
// (phase error wrapped to (-pi, pi], inside the window when |error| <= 0.5
// rad; weight 1 for PHAT, |M1||M2| for UCC; previous-segment terms added
// when smoothing) and checks the returned lag and score against the best
// one. Covered: PHAT and UCC, all three lengths, a delay at the edge of the
// range, smoothing on and off. The search must take exactly
// 61*(nbins+1)+2 clocks.
module tb_gcc_core
  import sl_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, phat_en = 1'b1, smooth_en = 1'b0;
  logic [3:0] seg_log2 = 4'd10;
  logic [7:0] rd_addr;
  magph_t cur1, cur2, prev1, prev2;
  logic busy, done;
  logic signed [7:0] tdoa;
  logic [63:0] score;
  magph_t m_c1 [256], m_c2 [256], m_p1 [256], m_p2 [256];
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  // random positive magnitude, 16-bit floating point, 2^-7 .. 2^8
  function automatic logic [15:0] rmag();
    return {1'b0, 5'($urandom_range(22, 8)), 10'($urandom())};
  endfunction

  // magnitude as the search weighs it: units of 2^-10, truncated
  function automatic real mfix(input logic [15:0] m);
    return $floor((1.0 + real'(m[9:0]) / 1024.0) * $pow(2.0, real'(int'(m[14:10]) - 15)) * 1024.0);
  endfunction

  gcc_core dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    cur1 <= m_c1[rd_addr]; cur2 <= m_c2[rd_addr];
    prev1 <= m_p1[rd_addr]; prev2 <= m_p2[rd_addr];
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // fill one segment pair with delay d; bad_pct percent of bins random
  task automatic fill(input bit prev, input int lg, input int d, input int bad_pct);
    magph_t a, b;
    int off;
    for (int k = 0; k < 256; k++) begin
      a.mag = rmag();
      b.mag = rmag();
      a.phase = 16'($urandom());
      off = ((k * d) << (16 - lg)) + int'($urandom_range(3000)) - 1500;
      b.phase = 16'(int'(a.phase) - off);
      if (int'($urandom_range(99)) < bad_pct) b.phase = 16'($urandom());
      if (prev) begin m_p1[k] = a; m_p2[k] = b; end
      else begin m_c1[k] = a; m_c2[k] = b; end
    end
  endtask

  function automatic real ref_term(input magph_t a, input magph_t b, input int k,
                                   input int beta, input int len, input bit phat);
    real th;
    th = (real'(a.phase) - real'(b.phase)) * 2.0 * PI / 65536.0
         - 2.0 * PI * k * beta / len;
    while (th > PI) th -= 2.0 * PI;
    while (th <= -PI) th += 2.0 * PI;
    if (th <= 0.5 && th >= -0.5) return phat ? 1.0 : mfix(a.mag) * mfix(b.mag);
    return 0.0;
  endfunction

  task automatic search(input int lg, input bit phat, input bit smooth);
    int len, nb, cycles, best_lag;
    real sc, best;
    len = 1 << lg;
    nb = (len / 2 + 1 > 256) ? 256 : len / 2 + 1;
    best = -1.0; best_lag = 0;
    for (int beta = -30; beta <= 30; beta++) begin
      sc = 0.0;
      for (int k = 0; k < nb; k++) begin
        sc += ref_term(m_c1[k], m_c2[k], k, beta, len, phat);
        if (smooth) sc += ref_term(m_p1[k], m_p2[k], k, beta, len, phat);
      end
      if (sc > best) begin best = sc; best_lag = beta; end
    end
    @(negedge clk);
    seg_log2 = 4'(lg); phat_en = phat; smooth_en = smooth; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    check(tdoa == 8'(best_lag), $sformatf("L=%0d phat=%0d smooth=%0d tdoa %0d exp %0d",
                                          len, phat, smooth, tdoa, best_lag));
    check(real'(score) == best, $sformatf("score %0d exp %f", score, best));
    check(cycles == 61 * (nb + 1) + 2, $sformatf("search time %0d clocks", cycles));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fill(0, 10, 7, 40);   search(10, 1, 0);
    fill(0, 10, -13, 50); search(10, 0, 0);
    fill(0, 9, 30, 30);   search(9, 1, 0);
    fill(0, 8, -30, 30);  search(8, 0, 0);
    // smoothing: previous segment clear, current one mostly noise
    fill(1, 10, 4, 20);
    fill(0, 10, 4, 85);   search(10, 1, 1);
    search(10, 1, 0);
    search(10, 0, 1);
    for (int i = 0; i < 6; i++) begin
      fill(1, 9, int'($urandom_range(60)) - 30, 60);
      fill(0, 9, int'($urandom_range(60)) - 30, 60);
      search(9, i[0], i[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
