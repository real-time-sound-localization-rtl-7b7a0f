// tdoa_estimator: stage 3, the TDOA estimation block.
//
// Each channel has three GCC buffers. At any time one of them is being
// written by stage 2 (the "write" buffer), one holds the spectrum of the
// latest complete segment ("current") and one that of the segment before
// it ("previous"). Two read multiplexers per channel feed the current and
// previous spectra to gcc_core, which reads all of them with one shared
// address.
//
// When stage 2 has filled the write buffers it pulses commit (allowed only
// while ready is high, i.e. the search is idle). The buffers then rotate:
// write -> current, current -> previous, previous -> next write buffer, and
// the search starts on the same clock. Smoothing over the previous segment
// is used only when smooth_en is set and the previous buffers hold a segment
// of the same length (smoothed reports that it was). tdoa, score and valid
// come from gcc_core (valid = its done pulse).
//
// The three buffers per channel and the multiplexers follow the document's
// block diagram; the rotation order and the smoothing rule are this design's.
module tdoa_estimator
  import sl_pkg::*;
#(
  parameter int GCC_BINS = 256,
  parameter int MAX_LAG  = sl_pkg::LAG_RANGE,
  localparam int BW      = $clog2(GCC_BINS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // write side, from stage 2
  input  logic               wr_en1,
  input  logic [BW-1:0]      wr_addr1,
  input  magph_t             wr_data1,
  input  logic               wr_en2,
  input  logic [BW-1:0]      wr_addr2,
  input  magph_t             wr_data2,
  input  logic               commit,
  input  logic [3:0]         commit_log2,
  output logic               ready,
  // controls
  input  logic               phat_en,
  input  logic               smooth_en,
  // result
  output logic               valid,
  output logic signed [7:0]  tdoa,
  output logic [SCORE_W-1:0] score,
  output logic               smoothed
);
  logic [1:0] wbuf, cbuf, pbuf;
  logic       cur_ok;
  logic [3:0] cur_log2;
  logic       use_prev;

  logic [BW-1:0] rd_addr;
  magph_t        rd1 [3];
  magph_t        rd2 [3];
  magph_t        cur1, cur2, prev1, prev2;
  logic          g_busy;

  for (genvar b = 0; b < 3; b++) begin : g_buf
    gcc_buffer #(.DEPTH(GCC_BINS), .W(16)) u_ch1 (
      .clk, .we(wr_en1 && wbuf == 2'(b)), .wr_addr(wr_addr1), .wr_data(wr_data1),
      .rd_addr, .rd_data(rd1[b])
    );
    gcc_buffer #(.DEPTH(GCC_BINS), .W(16)) u_ch2 (
      .clk, .we(wr_en2 && wbuf == 2'(b)), .wr_addr(wr_addr2), .wr_data(wr_data2),
      .rd_addr, .rd_data(rd2[b])
    );
  end

  // read multiplexers
  assign cur1  = rd1[cbuf];
  assign cur2  = rd2[cbuf];
  assign prev1 = rd1[pbuf];
  assign prev2 = rd2[pbuf];

  assign ready    = !g_busy;
  assign use_prev = smooth_en && cur_ok && (cur_log2 == commit_log2);

  gcc_core #(.GCC_BINS(GCC_BINS), .MAX_LAG(MAX_LAG)) u_gcc (
    .clk, .rst_n, .start(commit && !g_busy), .seg_log2(commit_log2),
    .phat_en, .smooth_en(use_prev), .rd_addr, .cur1, .cur2, .prev1, .prev2,
    .busy(g_busy), .done(valid), .tdoa, .score
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbuf     <= 2'd0;
      cbuf     <= 2'd1;
      pbuf     <= 2'd2;
      cur_ok   <= 1'b0;
      cur_log2 <= '0;
      smoothed <= 1'b0;
    end else if (commit && !g_busy) begin
      cbuf     <= wbuf;
      pbuf     <= cbuf;
      wbuf     <= pbuf;
      cur_ok   <= 1'b1;
      cur_log2 <= commit_log2;
      smoothed <= use_prev;
    end
  end

  // stage 2 must not commit while the search is still reading
  a_commit_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                   commit |-> ready);
endmodule
