// cordic: iterative CORDIC unit shared by the FFT and the magnitude/phase
// conversion of one channel.
//
// mode = 0 (rotation): rotates (x_in, y_in) by the angle z_in. With
//   x_in = A, y_in = 0 it returns x_out = A*cos(z), y_out = A*sin(z); the
//   FFT uses it for its twiddle factors.
// mode = 1 (vectoring): rotates (x_in, y_in) onto the positive x axis and
//   returns x_out = sqrt(x^2 + y^2) and z_out = atan2(y, x); z_in is unused.
//
// Angles are 16-bit binary angles (65536 = one turn). The unit first folds
// the problem into the right half-plane by a 180-degree rotation, then runs
// ITER micro-rotations, one per clock, on GUARD extra fraction bits, and
// finally removes the CORDIC gain (1.64676) by multiplying with
// 19898/32768. Micro-rotation angles: ATAN(i) = round(atan(2**-i) * 65536 /
// (2*pi)).
//
// Timing: start is taken when busy is low; done pulses with valid outputs
// ITER + 2 clocks later (18 for ITER = 16), and the outputs hold until the
// next start. The document chooses CORDIC for both tasks; iteration count,
// widths and angle format are this design's choices.
module cordic #(
  parameter int ITER  = 16,
  parameter int GUARD = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               mode,      // 0 rotation, 1 vectoring
  input  logic signed [16:0] x_in,
  input  logic signed [16:0] y_in,
  input  logic        [15:0] z_in,
  output logic               busy,
  output logic               done,
  output logic signed [17:0] x_out,
  output logic signed [17:0] y_out,
  output logic        [15:0] z_out
);
  localparam int IW = 17 + GUARD + 3;   // input width, guard bits, growth
  localparam logic signed [15:0] GAINC = 16'sd19898;   // 2^15 / 1.64676

  function automatic logic [15:0] atan_tab(input int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;
      3: return 16'd1297;  4: return 16'd651;   5: return 16'd326;
      6: return 16'd163;   7: return 16'd81;    8: return 16'd41;
      9: return 16'd20;   10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;   13: return 16'd1;    14: return 16'd1;
      default: return 16'd0;
    endcase
  endfunction

  logic signed [IW-1:0] x, y;
  logic        [15:0]   z;
  logic                 md;
  logic [$clog2(ITER+1)-1:0] it;
  logic                 run;

  logic signed [IW-1:0] xs, ys, xin_e, yin_e;
  logic                 dir_neg;   // rotate clockwise this step
  logic signed [IW+16:0] xg, yg;

  assign xs = x >>> it;
  assign ys = y >>> it;
  // vectoring: drive y to zero; rotation: drive z to zero
  assign dir_neg = md ? (y >= 0) : z[15];
  assign xin_e   = IW'(x_in) <<< GUARD;
  assign yin_e   = IW'(y_in) <<< GUARD;
  assign xg = x * GAINC;
  assign yg = y * GAINC;
  assign busy = run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      it   <= '0;
      x <= '0; y <= '0; z <= '0; md <= 1'b0;
      x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        md  <= mode;
        it  <= '0;
        run <= 1'b1;
        if (mode) begin
          // vectoring: reflect the left half-plane, remember pi
          if (x_in < 0) begin
            x <= -xin_e; y <= -yin_e; z <= 16'h8000;
          end else begin
            x <= xin_e;  y <= yin_e;  z <= 16'h0000;
          end
        end else begin
          // rotation: angles beyond +-90 degrees are rotated by 180 first
          if (z_in[15] ^ z_in[14]) begin
            x <= -xin_e; y <= -yin_e; z <= z_in + 16'h8000;
          end else begin
            x <= xin_e;  y <= yin_e;  z <= z_in;
          end
        end
      end else if (run) begin
        if (32'(it) == ITER) begin
          run   <= 1'b0;
          done  <= 1'b1;
          x_out <= 18'(xg >>> (15 + GUARD));
          y_out <= 18'(yg >>> (15 + GUARD));
          z_out <= z;
        end else begin
          it <= it + 1'b1;
          if (dir_neg) begin
            x <= x + ys;
            y <= y - xs;
            z <= z + atan_tab(32'(it));
          end else begin
            x <= x - ys;
            y <= y + xs;
            z <= z - atan_tab(32'(it));
          end
        end
      end
    end
  end
endmodule
