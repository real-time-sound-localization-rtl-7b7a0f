// channel_proc: stage 2 of the pipeline for one microphone channel.
//
// On start it takes one finished segment of L = 2**seg_log2 samples from the
// channel buffer and turns it into magnitude/phase pairs in a GCC buffer:
//
//  1. LOAD   reads sample n from the channel buffer, windows it and converts
//            it to 16-bit floating point (window_convert), and writes it to
//            the FFT buffer at the bit-reversed address of n (one sample
//            per clock).
//  2. FFT    in-place radix-2 decimation-in-time FFT, stage by stage, in
//            16-bit floating point (fp16_pkg). For every distinct twiddle
//            exp(-j*2*pi*t/span) the CORDIC is run once in rotation mode;
//            its fixed-point cosine and sine (14 fraction bits) multiply
//            the floating-point data directly. Every butterfly using that
//            twiddle then takes 4 clocks: read a, read b, write
//            a' = a + b*w, write b' = a - b*w.
//  3. MAGPH  bins 0 .. min(GCC_BINS, L/2+1)-1, in natural order, are read
//            back. Real and imaginary part are aligned to the larger of
//            their two exponents as 16-bit fixed-point numbers, the CORDIC
//            (vectoring mode) returns magnitude and phase, and the magnitude
//            is packed back to 16-bit floating point with that exponent.
//            {magnitude, phase} goes out on the GCC buffer port.
//
// done pulses for one clock when the last bin is written; busy is high from
// start until then. The channel buffer read port has one clock of latency.
// For L = 1024 the whole job takes about 46,000 clocks, against 512,000
// clocks per segment at a 10 MHz clock and 20 kHz sampling. Input samples
// are fractions of full scale, so a bin's magnitude is at most L/2.
//
// The document gives the order of operations (window, 16-bit floating
// point, FFT in place, CORDIC for twiddles and for magnitude/phase) and the
// buffer sizes. The radix-2 schedule, the floating-point details and the
// use of only the first GCC_BINS bins are this design's choices.
module channel_proc
  import sl_pkg::*;
  import fp16_pkg::*;
#(
  parameter int NMAX     = 1024,
  parameter int GCC_BINS = 256,
  localparam int AW      = $clog2(NMAX),
  localparam int BW      = $clog2(GCC_BINS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [3:0]     seg_log2,    // log2 L, 8..AW
  output logic           busy,
  output logic           done,
  // channel buffer read port
  output logic [AW-1:0]  cb_rd_addr,
  input  logic [7:0]     cb_rd_data,
  // GCC buffer write port
  output logic           gw_en,
  output logic [BW-1:0]  gw_addr,
  output magph_t         gw_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_TW_REQ, S_TW_WAIT, S_BF_RA, S_BF_RB, S_BF_CW, S_BF_WB,
    S_MP_RD, S_MP_REQ, S_MP_WAIT, S_DONE
  } state_e;

  state_e state;
  logic [3:0]    lg;          // log2 L of the segment in work
  logic [AW:0]   len;         // L
  logic [AW-1:0] cnt;         // load index
  logic          ld_v;        // a loaded sample is on cb_rd_data
  logic [AW-1:0] ld_idx;
  logic [3:0]    stg;         // FFT stage, 1..lg
  logic [AW-1:0] half;        // 2**(stg-1)
  logic [AW-1:0] tw_j;        // twiddle index within the stage
  logic [AW:0]   k;           // top address of the current butterfly
  logic signed [15:0] tw_re, tw_im;
  cplx_t         a_q, bp_q;
  logic [BW:0]   bin, nbins;

  // ---- memories and shared units -----------------------------------------
  logic          fb_we;
  logic [AW-1:0] fb_waddr, fb_raddr;
  cplx_t         fb_wdata, fb_rdata;

  fft_buffer #(.DEPTH(NMAX), .W(16)) u_fft_buf (
    .clk, .we(fb_we), .wr_addr(fb_waddr), .wr_data(fb_wdata),
    .rd_addr(fb_raddr), .rd_data(fb_rdata)
  );

  fp16_t win_out;
  window_convert #(.NMAX(NMAX)) u_win (
    .sample($signed(cb_rd_data)), .index(ld_idx), .seg_log2(lg), .out(win_out)
  );

  logic               c_start, c_mode, c_done;
  logic signed [16:0] c_x, c_y;
  logic        [15:0] c_z;
  logic signed [17:0] c_xo, c_yo;
  logic        [15:0] c_zo;

  cordic u_cordic (
    .clk, .rst_n, .start(c_start), .mode(c_mode), .x_in(c_x), .y_in(c_y),
    .z_in(c_z), .busy(), .done(c_done), .x_out(c_xo), .y_out(c_yo),
    .z_out(c_zo)
  );

  // ---- helpers ------------------------------------------------------------
  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] v,
                                           input logic [3:0] l);
    logic [AW-1:0] r;
    for (int i = 0; i < AW; i++) r[i] = v[AW-1-i];
    return r >> (4'(AW) - l);
  endfunction

  function automatic fp16_t fneg(input fp16_t v);
    return {~v[15], v[14:0]};
  endfunction

  // butterfly arithmetic: t = b*w, a' = a + t, b' = a - t
  fp16_t t_re, t_im;
  cplx_t a_new, b_new;
  assign t_re = fp16_add(fp16_mul_q14(fb_rdata.re, tw_re),
                         fneg(fp16_mul_q14(fb_rdata.im, tw_im)));
  assign t_im = fp16_add(fp16_mul_q14(fb_rdata.re, tw_im),
                         fp16_mul_q14(fb_rdata.im, tw_re));
  assign a_new.re = fp16_add(a_q.re, t_re);
  assign a_new.im = fp16_add(a_q.im, t_im);
  assign b_new.re = fp16_add(a_q.re, fneg(t_re));
  assign b_new.im = fp16_add(a_q.im, fneg(t_im));

  // floating point -> fixed point aligned to exponent e (for the CORDIC)
  function automatic logic signed [16:0] align(input fp16_t v, input logic [4:0] e);
    logic [15:0] m;
    if (v[14:10] == '0) return '0;
    m = 16'({1'b1, v[9:0], 4'b0000}) >> (e - v[14:10]);
    return v[15] ? -17'(m) : 17'(m);
  endfunction

  logic [4:0] mp_e_now, mp_e;   // common exponent of the bin in conversion
  assign mp_e_now = (fb_rdata.re[14:10] > fb_rdata.im[14:10]) ? fb_rdata.re[14:10]
                                                              : fb_rdata.im[14:10];

  logic [AW:0]  span;
  logic [15:0]  tw_angle;
  assign len      = (AW+1)'(1) << lg;
  assign span     = {half, 1'b0};
  assign tw_angle = 16'(-(32'(tw_j) << (16 - 32'(stg))));
  assign busy     = (state != S_IDLE);

  // ---- datapath steering --------------------------------------------------
  always_comb begin
    cb_rd_addr = cnt;
    fb_we    = 1'b0;
    fb_waddr = '0;
    fb_wdata = '0;
    fb_raddr = '0;
    c_start  = 1'b0;
    c_mode   = 1'b0;
    c_x      = 17'sd16384;
    c_y      = '0;
    c_z      = tw_angle;
    if (ld_v) begin
      fb_we    = 1'b1;
      fb_waddr = bitrev(ld_idx, lg);
      fb_wdata = '{re: win_out, im: 16'h0000};
    end
    case (state)
      S_TW_REQ: c_start = 1'b1;
      S_BF_RA:  fb_raddr = AW'(k);
      S_BF_RB:  fb_raddr = AW'(k) + half;
      S_BF_CW: begin
        fb_we = 1'b1; fb_waddr = AW'(k); fb_wdata = a_new;
      end
      S_BF_WB: begin
        fb_we = 1'b1; fb_waddr = AW'(k) + half; fb_wdata = bp_q;
      end
      S_MP_RD:  fb_raddr = AW'(bin);
      S_MP_REQ: begin
        c_start = 1'b1; c_mode = 1'b1;
        c_x = align(fb_rdata.re, mp_e_now); c_y = align(fb_rdata.im, mp_e_now);
      end
      default: ;
    endcase
  end

  always_comb begin
    gw_en   = (state == S_MP_WAIT) && c_done;
    gw_addr = BW'(bin);
    gw_data.mag   = (mp_e == '0) ? 16'h0000
                                   : fp16_norm(1'b0, 32'(c_xo), int'(mp_e) - 15 - 14);
    gw_data.phase = c_zo;
  end

  // ---- sequencer ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      ld_v  <= 1'b0;
      lg    <= 4'(AW);
      cnt   <= '0; ld_idx <= '0; stg <= '0; half <= '0; tw_j <= '0; k <= '0;
      tw_re <= '0; tw_im <= '0; a_q <= '0; bp_q <= '0; bin <= '0; nbins <= '0;
      mp_e  <= '0;
    end else begin
      done   <= 1'b0;
      ld_v   <= (state == S_LOAD);
      ld_idx <= cnt;
      case (state)
        S_IDLE: if (start) begin
          lg    <= (seg_log2 > 4'(AW)) ? 4'(AW) : seg_log2;
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if ({1'b0, cnt} == len - 1'b1) begin
            stg   <= 4'd1;
            half  <= AW'(1);
            tw_j  <= '0;
            state <= S_TW_REQ;
          end else cnt <= cnt + 1'b1;
        end
        S_TW_REQ: state <= S_TW_WAIT;
        S_TW_WAIT: if (c_done) begin
          tw_re <= 16'(c_xo);
          tw_im <= 16'(c_yo);
          k     <= (AW+1)'(tw_j);
          state <= S_BF_RA;
        end
        S_BF_RA: state <= S_BF_RB;
        S_BF_RB: begin
          a_q   <= fb_rdata;
          state <= S_BF_CW;
        end
        S_BF_CW: begin
          bp_q  <= b_new;
          state <= S_BF_WB;
        end
        S_BF_WB: begin
          if (k + span < len) begin
            k     <= k + span;
            state <= S_BF_RA;
          end else if (tw_j + 1'b1 < half) begin
            tw_j  <= tw_j + 1'b1;
            state <= S_TW_REQ;
          end else if (stg < lg) begin
            stg   <= stg + 1'b1;
            half  <= half << 1;
            tw_j  <= '0;
            state <= S_TW_REQ;
          end else begin
            bin   <= '0;
            nbins <= (len[AW:1] + 1'b1 > (AW)'(GCC_BINS)) ? (BW+1)'(GCC_BINS)
                                                          : (BW+1)'(len[AW:1] + 1'b1);
            state <= S_MP_RD;
          end
        end
        S_MP_RD:  state <= S_MP_REQ;
        S_MP_REQ: begin
          mp_e  <= mp_e_now;
          state <= S_MP_WAIT;
        end
        S_MP_WAIT: if (c_done) begin
          if (bin + 1'b1 == nbins) state <= S_DONE;
          else begin
            bin   <= bin + 1'b1;
            state <= S_MP_RD;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
