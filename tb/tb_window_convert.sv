// tb_window_convert: self-checking test of the Hanning window and format
// conversion.
//
// For all three segment lengths and 3000 random (sample, index) pairs, plus
// the window's ends and centre, the floating-point output is decoded and
// compared with (sample / 128) * round(32767 * 0.5 * (1 - cos(2*pi*n/L))) /
// 32768 worked out in real arithmetic. Accepted: half a unit in the last
// place (relative 2^-11), or zero where the exact value is below the
// smallest normal number 2^-14. The block is combinational.
module tb_window_convert
  import fp16_pkg::*;
;
  logic signed [7:0] sample;
  logic [9:0]        index;
  logic [3:0]        seg_log2;
  fp16_t out;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  window_convert dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int s, input int n, input int lg);
    real w, e, g, tol;
    int  len;
    len = 1 << lg;
    sample = 8'(s); index = 10'(n); seg_log2 = 4'(lg);
    #1;
    w = $rtoi(32767.0 * 0.5 * (1.0 - $cos(2.0 * PI * n / len)) + 0.5);
    e = s * w / 128.0 / 32768.0;
    g = (out[14:10] == '0) ? 0.0
        : (1.0 + real'(out[9:0]) / 1024.0) * $pow(2.0, real'(int'(out[14:10]) - 15));
    if (out[15]) g = -g;
    tol = (e < 0.0 ? -e : e) / 2048.0 * 1.0001;
    if (tol < $pow(2.0, -14.0) && (e < $pow(2.0, -14.0) && e > -$pow(2.0, -14.0)))
      tol = $pow(2.0, -14.0);
    checks++;
    if (g - e > tol || e - g > tol) begin
      failures++;
      $display("FAIL s=%0d n=%0d L=%0d out=%h (%g) exp=%g", s, n, len, out, g, e);
    end
  endtask

  initial begin
    for (int lg = 8; lg <= 10; lg++) begin
      one(127, 0, lg);
      one(-128, (1 << lg) / 2, lg);
      one(127, (1 << lg) / 2, lg);
      one(100, (1 << lg) / 4, lg);
      one(-77, (1 << lg) - 1, lg);
      for (int i = 0; i < 1000; i++)
        one(int'($urandom_range(255)) - 128, int'($urandom_range((1 << lg) - 1)), lg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
