// window_convert: Hanning window and conversion to the FFT-buffer format.
//
// For sample n of a segment of length L = 2**seg_log2 the output is the
// 16-bit floating-point number (fp16_pkg) nearest to
//   (sample / 128) * (w / 32768),   w = round(32767 * 0.5 * (1 - cos(2*pi*n/L)))
// i.e. the 8-bit sample read as a fraction of full scale, weighted by the
// window. The window is held once, for L = NMAX, as a table of 16-bit
// fractions built at elaboration from the formula above; a shorter segment
// reads it at index n * NMAX / L. Purely combinational.
//
// The document names the Hanning window and the conversion to 16-bit
// floating point; the window formula is the usual Hanning definition, and
// the floating-point layout and rounding are this design's choices.
module window_convert
  import fp16_pkg::*;
#(
  parameter int NMAX = 1024,
  localparam int AW  = $clog2(NMAX)
) (
  input  logic signed [7:0]  sample,
  input  logic [AW-1:0]      index,     // n, position in the segment
  input  logic [3:0]         seg_log2,  // log2 of L, at most AW
  output fp16_t              out
);
  typedef logic [15:0] win_t;
  typedef win_t win_tab_t [NMAX];

  function automatic win_tab_t make_hann();
    win_tab_t t;
    real pi;
    pi = 3.14159265358979323846;
    for (int i = 0; i < NMAX; i++)
      t[i] = 16'($rtoi(32767.0 * 0.5 * (1.0 - $cos(2.0 * pi * i / NMAX)) + 0.5));
    return t;
  endfunction

  localparam win_tab_t HANN = make_hann();

  logic [AW-1:0]       tab_idx;
  logic signed [24:0]  prod;
  logic        [24:0]  aprod;

  assign tab_idx = index << (4'(AW) - seg_log2);
  assign prod    = sample * $signed({1'b0, HANN[tab_idx]});
  assign aprod   = prod[24] ? 25'(-prod) : 25'(prod);
  assign out     = fp16_norm(prod[24], 32'(aprod), -22);
endmodule
