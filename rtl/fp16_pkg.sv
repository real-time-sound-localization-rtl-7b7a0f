// fp16_pkg: the 16-bit floating-point format of the FFT buffers and the
// arithmetic on it.
//
// Layout {sign, exponent[4:0], fraction[9:0]}, value
//   (-1)^sign * 1.fraction * 2^(exponent - 15),
// the bit layout of IEEE 754 binary16. Simplified: exponent 0 means zero
// (no subnormals, results below 2^-14 flush to zero), and there are no
// infinities or NaNs: results too large saturate to +-65504. Rounding is to
// nearest, ties away from zero.
//
// fp16_norm  packs sign * mag * 2^scale, the common last step of all
//            operations (leading-one search, round, exponent range).
// fp16_add   a + b (exact alignment with three guard bits, then fp16_norm).
// fp16_mul_q14  a * w for a two's-complement fixed-point w with 14 fraction
//            bits (the CORDIC twiddle factors).
// fp16_to_fix   |a| * 2^frac as an unsigned integer, truncated.
//
// The document says only that the samples are converted to a 16-bit
// floating-point representation for the FFT; the layout, rounding and the
// handling of the range limits are this design's choices.
package fp16_pkg;
  typedef logic [15:0] fp16_t;

  localparam fp16_t FP16_MAX = 16'h7bff;   // 65504

  function automatic fp16_t fp16_norm(input logic sign, input logic [31:0] mag,
                                      input int scale);
    int  p, e;
    logic [31:0] m;
    logic        rb;
    if (mag == '0) return '0;
    p = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) p = i;
    // 11 significant bits (hidden one included) and the rounding bit
    if (p >= 10) begin
      m  = mag >> (p - 10);
      rb = (p >= 11) ? mag[p - 11] : 1'b0;
    end else begin
      m  = mag << (10 - p);
      rb = 1'b0;
    end
    e = p + scale + 15;
    if (rb) begin
      m = m + 1;
      if (m[11]) begin m = m >> 1; e = e + 1; end
    end
    if (e <= 0)  return '0;
    if (e >= 31) return {sign, FP16_MAX[14:0]};
    return {sign, 5'(e), m[9:0]};
  endfunction

  function automatic fp16_t fp16_add(input fp16_t a, input fp16_t b);
    fp16_t       x, y, t;
    logic [13:0] mx, my;
    logic [14:0] s;
    int          d;
    // order so that |x| >= |y|
    if (a[14:0] >= b[14:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    if (y[14:10] == '0) return (x[14:10] == '0) ? '0 : x;
    mx = {1'b1, x[9:0], 3'b000};
    my = {1'b1, y[9:0], 3'b000};
    d  = int'(x[14:10]) - int'(y[14:10]);
    my = (d > 13) ? '0 : my >> d;
    s  = (x[15] == y[15]) ? 15'(mx) + 15'(my) : 15'(mx) - 15'(my);
    t  = fp16_norm(x[15], 32'(s), int'(x[14:10]) - 15 - 13);
    return t;
  endfunction

  function automatic fp16_t fp16_mul_q14(input fp16_t a, input logic signed [15:0] w);
    logic [15:0] aw;
    logic [26:0] p;
    if (a[14:10] == '0 || w == '0) return '0;
    aw = w[15] ? 16'(-w) : 16'(w);
    p  = {1'b1, a[9:0]} * aw;
    return fp16_norm(a[15] ^ w[15], 32'(p), int'(a[14:10]) - 15 - 10 - 14);
  endfunction

  function automatic logic [31:0] fp16_to_fix(input fp16_t a, input int frac);
    int sh;
    if (a[14:10] == '0) return '0;
    sh = int'(a[14:10]) - 15 - 10 + frac;
    if (sh >= 0) return 32'({1'b1, a[9:0]}) << sh;
    if (sh <= -11) return '0;
    return 32'({1'b1, a[9:0]}) >> (-sh);
  endfunction
endpackage
