// gcc_core: the GCC search of stage 3, equation
//   tau = argmax_beta  sum_k  W(k) |M1(k)| |M2(k)| rect(theta(k) / eps)
//   theta(k) = phase1(k) - phase2(k) - 2*pi*k*beta/L
// over the lags beta = -MAX_LAG .. +MAX_LAG sample periods, with
// rect(t) = 1 for |t| < 1 and eps = 0.5 rad.
//
// Phases are 16-bit binary angles, so theta wraps into (-pi, pi] by plain
// two's-complement overflow and the lag term is k*beta*65536/L, a shift of
// k*beta. With PHAT weighting (phat_en = 1) W = 1/(|M1||M2|) and each bin
// inside the window adds exactly 1: the score is a count of bins. With UCC
// weighting (phat_en = 0) a bin adds |M1||M2|, each magnitude taken from
// its 16-bit floating-point form as an integer in units of 2^-10 full scale
// (truncated), so the product is exact in SCORE_W bits.
//
// With smooth_en the same terms computed from the previous segment's
// spectra (prev1/prev2) are added, which smooths the estimate over two
// segments. The document keeps the previous segment for temporal smoothing
// but does not say how; this sum is this design's choice.
//
// One bin per clock through a synchronous read port (data one clock after
// rd_addr) shared by all four buffers: each lag takes nbins + 1 clocks,
// nbins = min(GCC_BINS, L/2 + 1). The whole search takes
// (2*MAX_LAG + 1) * (nbins + 1) + 2 clocks after start (15,679 for L = 1024);
// done then pulses once with tdoa and score valid. Ties keep the earlier,
// more negative lag. A positive tdoa means channel 2 lags channel 1.
module gcc_core
  import sl_pkg::*;
  import fp16_pkg::*;
#(
  parameter int GCC_BINS = 256,
  parameter int MAX_LAG  = sl_pkg::LAG_RANGE,
  parameter int EPS      = sl_pkg::EPS_ANGLE,
  localparam int BW      = $clog2(GCC_BINS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [3:0]         seg_log2,
  input  logic               phat_en,
  input  logic               smooth_en,
  output logic [BW-1:0]      rd_addr,
  input  magph_t             cur1,
  input  magph_t             cur2,
  input  magph_t             prev1,
  input  magph_t             prev2,
  output logic               busy,
  output logic               done,
  output logic signed [7:0]  tdoa,
  output logic [SCORE_W-1:0] score
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e             state;
  logic [3:0]         lg;
  logic               phat_q, smooth_q;
  logic signed [7:0]  lag;
  logic [BW:0]        kk, nbins;
  logic               dv;
  logic [BW-1:0]      dk;
  logic [SCORE_W-1:0] acc, acc_next, best;
  logic signed [7:0]  best_lag;
  logic               first;

  // weight of one bin of one segment
  function automatic logic [53:0] term(input magph_t m1, input magph_t m2,
                                       input logic [15:0] off, input logic phat);
    logic signed [15:0] theta;
    logic [26:0]        a1, a2;
    theta = $signed(m1.phase - m2.phase - off);
    a1 = 27'(fp16_to_fix(m1.mag, 10));
    a2 = 27'(fp16_to_fix(m2.mag, 10));
    if (theta >= -16'(EPS) && theta <= 16'(EPS))
      return phat ? 54'd1 : a1 * a2;
    return 54'd0;
  endfunction

  logic signed [BW+8:0] kb;
  logic [15:0]          off;
  logic [53:0]          t_cur, t_prev;
  assign kb       = $signed({1'b0, dk}) * lag;
  assign off      = 16'(32'(kb) << (16 - 32'(lg)));
  assign t_cur    = term(cur1, cur2, off, phat_q);
  assign t_prev   = smooth_q ? term(prev1, prev2, off, phat_q) : 54'd0;
  assign acc_next = dv ? acc + SCORE_W'(t_cur) + SCORE_W'(t_prev) : acc;
  assign rd_addr  = BW'(kk);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      tdoa  <= '0;
      score <= '0;
      lg <= 4'd10; phat_q <= 1'b1; smooth_q <= 1'b0; lag <= '0; kk <= '0;
      nbins <= '0; dv <= 1'b0; dk <= '0; acc <= '0; best <= '0;
      best_lag <= '0; first <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          lg       <= seg_log2;
          phat_q   <= phat_en;
          smooth_q <= smooth_en;
          nbins    <= ((11'd1 << (seg_log2 - 1'b1)) + 1'b1 > 11'(GCC_BINS))
                      ? (BW+1)'(GCC_BINS)
                      : (BW+1)'((11'd1 << (seg_log2 - 1'b1)) + 1'b1);
          lag      <= 8'(-MAX_LAG);
          kk       <= '0;
          acc      <= '0;
          dv       <= 1'b0;
          first    <= 1'b1;
          state    <= S_RUN;
        end
        S_RUN: begin
          acc <= acc_next;
          dv  <= 1'b1;
          dk  <= BW'(kk);
          kk  <= kk + 1'b1;
          if (kk + 1'b1 == nbins) state <= S_DRAIN;
        end
        S_DRAIN: begin
          dv <= 1'b0;
          if (first || acc_next > best) begin
            best     <= acc_next;
            best_lag <= lag;
          end
          first <= 1'b0;
          acc   <= '0;
          kk    <= '0;
          if (lag == 8'(MAX_LAG)) state <= S_DONE;
          else begin
            lag   <= lag + 1'b1;
            state <= S_RUN;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          tdoa  <= best_lag;
          score <= best;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
