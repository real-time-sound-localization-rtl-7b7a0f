// tb_fp16_pkg: self-checking test of the 16-bit floating-point arithmetic.
//
// Random operands over the whole exponent range (and some equal-magnitude
// and opposite-sign pairs) are decoded to reals; the results of fp16_add,
// fp16_mul_q14 and fp16_norm are compared with the real-arithmetic result.
// Accepted error: one unit in the last place of the result, or an absolute
// 2^-14 where the exact result falls below the smallest normal number and
// flushes to zero. Exact results beyond +-65504 must saturate to it.
module tb_fp16_pkg
  import fp16_pkg::*;
;
  int checks = 0, failures = 0;

  function automatic real dec(input fp16_t a);
    real v;
    if (a[14:10] == '0) return 0.0;
    v = (1.0 + real'(a[9:0]) / 1024.0) * $pow(2.0, real'(int'(a[14:10]) - 15));
    return a[15] ? -v : v;
  endfunction

  function automatic fp16_t rnd(input int emin, input int emax);
    return {1'($urandom_range(1)), 5'($urandom_range(emax, emin)), 10'($urandom())};
  endfunction

  task automatic near(input real got, input real want, input string what,
                      input bit sat = 1'b1);
    real tol, aw;
    if (sat && want > 65504.0) want = 65504.0;
    if (sat && want < -65504.0) want = -65504.0;
    aw  = want < 0.0 ? -want : want;
    tol = aw / 1024.0;
    if (tol < $pow(2.0, -14.0)) tol = $pow(2.0, -14.0);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %g want %g", what, got, want);
    end
  endtask

  initial begin
    fp16_t a, b, r;
    logic signed [15:0] w;
    int m, sc;
    for (int i = 0; i < 3000; i++) begin
      a = rnd(1, 29); b = rnd(1, 29);
      if (i % 10 == 0) b = {~a[15], a[14:0]};                  // cancels
      if (i % 10 == 1) b = {~a[15], a[14:1], ~a[0]};           // near cancel
      if (i % 10 == 2) b = {a[15], 5'(int'(a[14:10]) - 1), a[9:0]};
      r = fp16_add(a, b);
      near(dec(r), dec(a) + dec(b), $sformatf("add %h %h = %h", a, b, r));
      w = 16'($urandom_range(32767) - 16384);
      if (i % 50 == 0) w = 16'sd16384;
      r = fp16_mul_q14(a, w);
      near(dec(r), dec(a) * real'(w) / 16384.0, $sformatf("mul %h %0d = %h", a, w, r));
      m = int'($urandom_range(8388607));
      sc = int'($urandom_range(30)) - 30;
      r = fp16_norm(1'(i), 32'(m), sc);
      near(dec(r), (i % 2 ? -1.0 : 1.0) * real'(m) * $pow(2.0, real'(sc)), $sformatf("norm %0d %0d", m, sc));
      near(real'(fp16_to_fix(a, 10)), $floor((dec(a) < 0 ? -dec(a) : dec(a)) * 1024.0), "to_fix", 1'b0);
    end
    checks++;
    if (fp16_add(16'h7bff, 16'h7bff) != 16'h7bff) begin failures++; $display("FAIL saturation"); end
    checks++;
    if (fp16_add(16'h3c00, 16'hbc00) != 16'h0000) begin failures++; $display("FAIL 1-1"); end
    checks++;
    if (fp16_norm(1'b0, 32'd1, 0) != 16'h3c00) begin failures++; $display("FAIL norm 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
