// tb_fp16_pkg: self-checking test of the half-precision functions.
// Random operands are decoded to real numbers, the exact result is computed
// in double precision and the function output must lie within one unit in the
// last place of it (exactly representable cases must match exactly).
module tb_fp16_pkg;
  import fp16_pkg::*;

  int checks = 0, failures = 0;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real to_real(input fp16_t a);
    real m;
    if (a[14:10] == 0) return 0.0;
    m = (1.0 + real'(a[9:0]) / 1024.0) * pow2(int'(a[14:10]) - 15);
    return a[15] ? -m : m;
  endfunction

  function automatic real ulp_of(input real v);
    real av;
    int e;
    av = v < 0 ? -v : v;
    e = -14;
    while (e < 15 && pow2(e + 1) <= av) e++;
    return pow2(e - 10);
  endfunction

  task automatic expect_close(input string what, input fp16_t got, input real ref_v);
    real g, err;
    checks++;
    g = to_real(got);
    err = g - ref_v;
    if (err < 0) err = -err;
    if (err > ulp_of(ref_v) * 0.5001 + 1e-12 && !(g == 0.0 && (ref_v < 6.2e-5 && ref_v > -6.2e-5))) begin
      failures++;
      $display("FAIL %s got %h (%f) expected %f", what, got, g, ref_v);
    end
  endtask

  function automatic fp16_t rnd_fp();
    fp16_t v;
    v = 16'($urandom);
    v[14:10] = 5'(8 + ($urandom % 14)); // magnitudes 2^-7 .. 2^6
    return v;
  endfunction

  initial begin
    fp16_t a, b;
    // directed values
    expect_close("1+1", fp_add(FP_ONE, FP_ONE), 2.0);
    expect_close("1-1", fp_sub(FP_ONE, FP_ONE), 0.0);
    expect_close("3*0.5", fp_mul(16'h4200, FP_HALF), 1.5);
    expect_close("1/3", fp_div(FP_ONE, 16'h4200), 1.0 / 3.0);
    expect_close("sqrt2", fp_sqrt(FP_TWO), 1.41421356);
    expect_close("sqrt9", fp_sqrt(16'h4880), 3.0);
    expect_close("int-37", fp_from_int(-37), -37.0);
    checks++; if (fp_floor(16'hBE00) != -2) begin failures++; $display("FAIL floor(-1.5)"); end
    checks++; if (fp_floor(16'h4E20) != 24) begin failures++; $display("FAIL floor(24.5)"); end
    checks++; if (!fp_lt(16'hBC00, FP_ZERO) || fp_lt(FP_TWO, FP_ONE)) begin failures++; $display("FAIL lt"); end
    for (int i = 0; i < 3000; i++) begin
      a = rnd_fp();
      b = rnd_fp();
      expect_close("add", fp_add(a, b), to_real(a) + to_real(b));
      expect_close("mul", fp_mul(a, b), to_real(a) * to_real(b));
      expect_close("div", fp_div(a, b), to_real(a) / to_real(b));
      expect_close("sqrt", fp_sqrt({1'b0, a[14:0]}), $sqrt(to_real({1'b0, a[14:0]})));
      checks++;
      if (fp_lt(a, b) != (to_real(a) < to_real(b))) begin
        failures++;
        $display("FAIL lt %h %h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
