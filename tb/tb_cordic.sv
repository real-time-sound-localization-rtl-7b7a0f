// tb_cordic: self-checking test of the CORDIC unit.
//
// Rotation mode: a vector of length 16384 is rotated to 64 random angles and
// to the four axis angles; x_out/y_out are compared with 16384*cos and
// 16384*sin computed in real arithmetic (tolerance 4 LSB). Vectoring mode:
// 200 random vectors, including the left half-plane, are converted; the
// magnitude is compared with sqrt(x^2+y^2) (tolerance 4 LSB + 0.1%) and the
// phase with atan2 (tolerance 8/65536 turn, for vectors longer than 256).
// The done pulse must come 18 clocks after start.
module tb_cordic;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, mode = 1'b0;
  logic signed [16:0] x_in, y_in;
  logic [15:0] z_in;
  logic busy, done;
  logic signed [17:0] x_out, y_out;
  logic [15:0] z_out;
  int checks = 0, failures = 0;

  cordic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;

  task automatic run(input logic m, input int x, input int y, input int z, output int lat);
    @(negedge clk);
    mode = m; x_in = 17'(x); y_in = 17'(y); z_in = 16'(z); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int wrap16(input int v);
    int r; r = v % 65536; if (r > 32767) r -= 65536; if (r < -32768) r += 65536; return r;
  endfunction

  initial begin
    int lat, z, x, y, dz;
    real ang, ex, ey, em, ep;
    x_in = '0; y_in = '0; z_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // rotation
    for (int i = 0; i < 68; i++) begin
      z = (i < 4) ? i * 16384 : int'($urandom_range(65535));
      run(1'b0, 16384, 0, z, lat);
      ang = 2.0 * PI * z / 65536.0;
      ex = 16384.0 * $cos(ang); ey = 16384.0 * $sin(ang);
      check((x_out - ex) < 4.0 && (ex - x_out) < 4.0 && (y_out - ey) < 4.0 && (ey - y_out) < 4.0,
            $sformatf("rot z=%0d got %0d,%0d exp %f,%f", z, x_out, y_out, ex, ey));
      check(lat == 18, $sformatf("rotation latency %0d", lat));
    end
    // vectoring
    for (int i = 0; i < 200; i++) begin
      x = int'($urandom_range(65535)) - 32768;
      y = int'($urandom_range(65535)) - 32768;
      if (i % 4 == 0) begin x = x / 64; y = y / 64; end
      run(1'b1, x, y, 0, lat);
      em = $sqrt(real'(x) * x + real'(y) * y);
      ep = $atan2(real'(y), real'(x)) / (2.0 * PI) * 65536.0;
      check((x_out - em) < 4.0 + em / 1000.0 && (em - x_out) < 4.0 + em / 1000.0,
            $sformatf("vec (%0d,%0d) mag %0d exp %f", x, y, x_out, em));
      if (em > 256.0) begin
        dz = wrap16(int'(z_out) - $rtoi(ep + (ep < 0 ? -0.5 : 0.5)));
        check(dz <= 8 && dz >= -8, $sformatf("vec (%0d,%0d) phase %0d exp %f", x, y, z_out, ep));
      end
      check(lat == 18, $sformatf("vectoring latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
