// tb_tdoa_estimator: self-checking test of the TDOA estimation block
// (three GCC buffers per channel in rotation, read multiplexers, search).
//
// Segments of synthetic spectra (channel 2 delayed by D samples, with phase
// noise and a share of random bins) are written through the write ports and
// committed one after another. The next segment is written while the search
// of the previous one is still running, so a wrong rotation would corrupt
// the result. For each commit the testbench computes the expected lag and
// score itself from its copy of the current and previous segments, and
// checks tdoa, score and the smoothed flag: no smoothing for the first
// segment or after a change of length, smoothing otherwise when enabled.
module tb_tdoa_estimator
  import sl_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en1 = 1'b0, wr_en2 = 1'b0;
  logic [7:0] wr_addr1 = '0, wr_addr2 = '0;
  magph_t wr_data1 = '0, wr_data2 = '0;
  logic commit = 1'b0;
  logic [3:0] commit_log2 = 4'd10;
  logic ready, phat_en = 1'b1, smooth_en = 1'b1;
  logic valid, smoothed;
  logic signed [7:0] tdoa;
  logic [63:0] score;
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

  magph_t s1 [5][256], s2 [5][256];
  int seg_lg [5];

  tdoa_estimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic make(input int i, input int lg, input int d, input int bad_pct);
    int off;
    seg_lg[i] = lg;
    for (int k = 0; k < 256; k++) begin
      s1[i][k].mag = rmag();
      s2[i][k].mag = rmag();
      s1[i][k].phase = 16'($urandom());
      off = ((k * d) << (16 - lg)) + int'($urandom_range(2000)) - 1000;
      s2[i][k].phase = 16'(int'(s1[i][k].phase) - off);
      if (int'($urandom_range(99)) < bad_pct) s2[i][k].phase = 16'($urandom());
    end
  endtask

  task automatic write_seg(input int i);
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      wr_en1 = 1'b1; wr_en2 = 1'b1; wr_addr1 = 8'(k); wr_addr2 = 8'(k);
      wr_data1 = s1[i][k]; wr_data2 = s2[i][k];
    end
    @(negedge clk);
    wr_en1 = 1'b0; wr_en2 = 1'b0;
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

  // expected result for current segment c with optional previous p
  task automatic expect_of(input int c, input int p, input bit phat,
                           output int lag, output real best);
    int len, nb;
    real sc;
    len = 1 << seg_lg[c];
    nb = (len / 2 + 1 > 256) ? 256 : len / 2 + 1;
    best = -1.0; lag = 0;
    for (int beta = -30; beta <= 30; beta++) begin
      sc = 0.0;
      for (int k = 0; k < nb; k++) begin
        sc += ref_term(s1[c][k], s2[c][k], k, beta, len, phat);
        if (p >= 0) sc += ref_term(s1[p][k], s2[p][k], k, beta, len, phat);
      end
      if (sc > best) begin best = sc; lag = beta; end
    end
  endtask


  // commit segment c (already written) and check against c / p
  task automatic commit_check(input int c, input int p, input bit phat, input int next);
    int lag;
    real best;
    expect_of(c, p, phat, lag, best);
    while (!ready) @(negedge clk);
    @(negedge clk);
    commit = 1'b1; commit_log2 = 4'(seg_lg[c]); phat_en = phat;
    @(negedge clk);
    commit = 1'b0;
    check(!ready, "search busy after commit");
    fork
      if (next >= 0) write_seg(next);
      while (!valid) @(negedge clk);
    join
    check(tdoa == 8'(lag), $sformatf("seg %0d tdoa %0d exp %0d", c, tdoa, lag));
    check(real'(score) == best, $sformatf("seg %0d score %0d exp %f", c, score, best));
    check(smoothed == (p >= 0), $sformatf("seg %0d smoothed %0d", c, smoothed));
  endtask

  initial begin
    int lag;
    real best;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    make(0, 10, 5, 40);
    make(1, 10, 5, 85);
    make(2, 9, -17, 50);
    make(3, 9, -17, 60);
    make(4, 9, 22, 50);
    write_seg(0);
    commit_check(0, -1, 1'b1, 1);   // first: nothing to smooth with
    commit_check(1, 0, 1'b1, 2);    // smoothed with segment 0
    commit_check(2, -1, 1'b1, 3);   // length changed: no smoothing
    commit_check(3, 2, 1'b0, 4);    // UCC, smoothed with 2
    smooth_en = 1'b0;
    commit_check(4, -1, 1'b1, -1);  // smoothing switched off
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
