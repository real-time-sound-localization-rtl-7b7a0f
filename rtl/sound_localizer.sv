// sound_localizer: real-time time-difference-of-arrival (TDOA) estimator
// for one microphone pair.
//
// Three pipeline stages work on consecutive segments of L = 256, 512 or
// 1024 samples (seg_sel):
//   stage 1  channel_buffer x2: the 8 MSBs of each 24-bit ADC word are
//            stored as they arrive (sample_valid strobe).
//   stage 2  channel_proc x2: window, in-place FFT and CORDIC
//            magnitude/phase of the finished segment, into the write
//            buffers of the TDOA estimator.
//   stage 3  tdoa_estimator: three GCC buffers per channel in rotation and
//            the search over lags -MAX_LAG..+MAX_LAG for the largest
//            rect-windowed phase-error sum (PHAT or UCC weights).
//
// Hand-over rules (this design's own): a segment that ends while stage 2 is
// still occupied is dropped and overrun pulses. Stage 2 is occupied from
// its start until both channels are done and stage 3 has taken the result;
// while stage 3 is still searching the previous segment stage 2 holds its
// result and stall is high. tdoa_valid pulses with each new estimate, in
// sample periods, positive when microphone 2 hears the source later.
//
// Timing at L = 1024: stage 2 needs about 47,000 clocks and stage 3 about
// 15,700, so at a 10 MHz clock and 20 kHz sampling (512,000 clocks per
// segment) every segment is processed. The latency from the last sample of
// a segment to tdoa_valid is the sum of the two, about 63,000 clocks.
module sound_localizer
  import sl_pkg::*;
#(
  parameter int NMAX     = 1024,
  parameter int GCC_BINS = 256,
  parameter int MAX_LAG  = sl_pkg::LAG_RANGE,
  localparam int AW      = $clog2(NMAX),
  localparam int BW      = $clog2(GCC_BINS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_valid,
  input  logic [23:0]        ch1_sample,
  input  logic [23:0]        ch2_sample,
  input  logic [1:0]         seg_sel,
  input  logic               phat_en,
  input  logic               smooth_en,
  output logic signed [7:0]  tdoa,
  output logic [SCORE_W-1:0] tdoa_score,
  output logic               tdoa_valid,
  output logic               tdoa_smoothed,
  output logic               overrun,
  output logic               stall
);
  // ---- stage 1 -------------------------------------------------------------
  logic          seg_done, seg_done2;
  logic [3:0]    seg_log2, seg_log2_2;
  logic [AW-1:0] wr_ptr1, wr_ptr2;
  logic [AW-1:0] cb_addr1, cb_addr2;
  logic [7:0]    cb_data1, cb_data2;

  channel_buffer #(.DEPTH(NMAX), .DW(8)) u_cb1 (
    .clk, .rst_n, .sample_valid, .sample(ch1_sample[23:16]), .seg_sel,
    .seg_done, .seg_log2, .wr_ptr(wr_ptr1), .rd_addr(cb_addr1), .rd_data(cb_data1)
  );
  channel_buffer #(.DEPTH(NMAX), .DW(8)) u_cb2 (
    .clk, .rst_n, .sample_valid, .sample(ch2_sample[23:16]), .seg_sel,
    .seg_done(seg_done2), .seg_log2(seg_log2_2), .wr_ptr(wr_ptr2),
    .rd_addr(cb_addr2), .rd_data(cb_data2)
  );

  // ---- stage 2 -------------------------------------------------------------
  logic          s2_occ, s2_start;
  logic [3:0]    s2_log2;
  logic          done1, done2, seen1, seen2, s2_fin;
  logic          gw_en1, gw_en2;
  logic [BW-1:0] gw_addr1, gw_addr2;
  magph_t        gw_data1, gw_data2;

  assign s2_start = seg_done && !s2_occ;

  channel_proc #(.NMAX(NMAX), .GCC_BINS(GCC_BINS)) u_proc1 (
    .clk, .rst_n, .start(s2_start), .seg_log2, .busy(), .done(done1),
    .cb_rd_addr(cb_addr1), .cb_rd_data(cb_data1),
    .gw_en(gw_en1), .gw_addr(gw_addr1), .gw_data(gw_data1)
  );
  channel_proc #(.NMAX(NMAX), .GCC_BINS(GCC_BINS)) u_proc2 (
    .clk, .rst_n, .start(s2_start), .seg_log2, .busy(), .done(done2),
    .cb_rd_addr(cb_addr2), .cb_rd_data(cb_data2),
    .gw_en(gw_en2), .gw_addr(gw_addr2), .gw_data(gw_data2)
  );

  // ---- stage 3 -------------------------------------------------------------
  logic est_ready, commit;
  assign s2_fin = seen1 && seen2;
  assign commit = s2_fin && est_ready;
  assign stall  = s2_fin && !est_ready;

  tdoa_estimator #(.GCC_BINS(GCC_BINS), .MAX_LAG(MAX_LAG)) u_est (
    .clk, .rst_n,
    .wr_en1(gw_en1), .wr_addr1(gw_addr1), .wr_data1(gw_data1),
    .wr_en2(gw_en2), .wr_addr2(gw_addr2), .wr_data2(gw_data2),
    .commit, .commit_log2(s2_log2), .ready(est_ready),
    .phat_en, .smooth_en,
    .valid(tdoa_valid), .tdoa, .score(tdoa_score), .smoothed(tdoa_smoothed)
  );

  // ---- pipeline control ----------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_occ  <= 1'b0;
      s2_log2 <= '0;
      seen1   <= 1'b0;
      seen2   <= 1'b0;
      overrun <= 1'b0;
    end else begin
      overrun <= seg_done && s2_occ;
      if (s2_start) begin
        s2_occ  <= 1'b1;
        s2_log2 <= seg_log2;
      end
      if (done1) seen1 <= 1'b1;
      if (done2) seen2 <= 1'b1;
      if (commit) begin
        s2_occ <= 1'b0;
        seen1  <= 1'b0;
        seen2  <= 1'b0;
      end
    end
  end

  // both channel buffers run in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               seg_done == seg_done2 && wr_ptr1 == wr_ptr2
                               && seg_log2 == seg_log2_2);
endmodule
