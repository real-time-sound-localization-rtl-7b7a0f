// sl_pkg: constants and types shared by the sound-localization datapath.
//
// Angles everywhere are 16-bit binary angles: 65536 is one full turn, so
// phase differences wrap for free in two's complement. The phase-error
// window of the GCC search is +-0.5 rad (the document's epsilon): a bin
// counts when |phase error| <= 5215 = floor(0.5 / (2*pi) * 65536). The lag
// search covers -30..+30 sample periods, as in the document. Segment
// lengths are the powers of two 256, 512 and 1024, chosen by a 2-bit code
// (the document allows 256 to 1024; the power-of-two restriction is this
// design's, for the radix-2 FFT).
package sl_pkg;
  localparam int EPS_ANGLE = 5215;   // floor(0.5 rad * 65536 / (2*pi)); bins with
                                     // a phase error of at most this count
  localparam int LAG_RANGE = 30;     // lag search range, in sample periods

  localparam int SCORE_W   = 64;     // width of a GCC score

  typedef logic [15:0] angle_t;      // binary angle

  // one FFT-buffer word: real and imaginary part, 16-bit floating point
  // each (format in fp16_pkg)
  typedef struct packed {
    logic [15:0] re;
    logic [15:0] im;
  } cplx_t;

  // one GCC-buffer word: magnitude (16-bit floating point) and phase
  typedef struct packed {
    logic [15:0] mag;
    angle_t      phase;
  } magph_t;

  typedef enum logic [1:0] {
    SEG_256  = 2'd0,
    SEG_512  = 2'd1,
    SEG_1024 = 2'd2
  } seg_sel_e;

  // log2 of the segment length for a seg_sel code (3 is read as 1024).
  function automatic logic [3:0] log2_of_sel(input logic [1:0] sel);
    case (sel)
      2'd0:    return 4'd8;
      2'd1:    return 4'd9;
      default: return 4'd10;
    endcase
  endfunction
endpackage
