// tb_fp_util_pkg: reference conversions between real numbers and
// half-precision words, and REND3R instruction assemblers, for testbenches.
package tb_fp_util_pkg;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2r(input logic [15:0] a);
    real m;
    if (a[14:10] == 0) return 0.0;
    m = (1.0 + real'(a[9:0]) / 1024.0) * pow2(int'(a[14:10]) - 15);
    return a[15] ? -m : m;
  endfunction

  // Nearest half-precision value (ties away from zero).
  function automatic logic [15:0] r2fp(input real v);
    real av, m;
    int e;
    int frac;
    logic s;
    s = v < 0.0;
    av = s ? -v : v;
    if (av < pow2(-14)) return {s, 15'd0};
    e = 0;
    while (av >= 2.0) begin av = av / 2.0; e++; end
    while (av < 1.0) begin av = av * 2.0; e--; end
    m = (av - 1.0) * 1024.0;
    frac = int'($floor(m + 0.5));
    if (frac == 1024) begin frac = 0; e++; end
    if (e > 15) return {s, 5'd31, 10'd0};
    return {s, 5'(e + 15), 10'(frac)};
  endfunction

  // Uniform random value in [lo, hi] divided by div.
  function automatic real rnd(input int lo, input int hi, input real div);
    int unsigned u;
    u = $urandom_range(0, hi - lo);
    return real'(lo + int'(u)) / div;
  endfunction

  // Instruction assemblers (opcode values of this design: F=1, C=2, L=3, S=4).
  function automatic logic [31:0] asm_f(input logic [1:0] func);
    return {21'd0, func, 6'd0, 3'd1};
  endfunction
  function automatic logic [31:0] asm_cam(input int prop, input logic [15:0] data);
    return {data, 5'(prop), 8'd0, 3'd2};
  endfunction
  function automatic logic [31:0] asm_lt(input int idx, input int prop, input logic [15:0] data);
    return {data, 5'(prop), 2'b00, 6'(idx), 3'd3};
  endfunction
  function automatic logic [31:0] asm_se(input int idx, input int prop, input int prop2);
    logic [18:0] i;
    i = 19'(idx);
    return {i[18:3], 5'(prop), 5'(prop2), i[2:0], 3'd4};
  endfunction
  function automatic logic [31:0] asm_sd(input logic [15:0] d, input logic [15:0] d2);
    return {d, d2};
  endfunction

endpackage
