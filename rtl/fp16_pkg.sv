// fp16_pkg: half-precision (IEEE 754 binary16) arithmetic used by every
// geometry and lighting datapath of the renderer.
//
// All scene values (positions, quaternions, scales, intensities) are 16-bit
// floats, and all geometry math is done in half precision. The functions
// below are combinational; the pipelines that use them place registers
// between calls. Format: sign [15], biased exponent [14:10] (bias 15),
// fraction [9:0].
//
// Simplifications chosen for this design (not IEEE-complete):
//   * subnormal inputs are read as zero and subnormal results flush to zero;
//   * exponent 31 is treated as infinity (no NaN propagation); overflow
//     saturates to infinity;
//   * add, multiply, divide and square root round to nearest, ties to even;
//   * fp_sqrt of a negative number returns zero.
package fp16_pkg;

  typedef logic [15:0] fp16_t;

  localparam fp16_t FP_ZERO = 16'h0000;
  localparam fp16_t FP_ONE  = 16'h3C00;
  localparam fp16_t FP_TWO  = 16'h4000;
  localparam fp16_t FP_HALF = 16'h3800;
  localparam fp16_t FP_INF  = 16'h7C00;

  function automatic logic fp_is_zero(input fp16_t a);
    return a[14:10] == 5'd0;
  endfunction

  function automatic fp16_t fp_neg(input fp16_t a);
    return {~a[15], a[14:0]};
  endfunction

  // Pack sign, unbiased-plus-15 exponent and an 11-bit mantissa (hidden bit
  // at bit 10) with guard and sticky bits, rounding to nearest even.
  function automatic fp16_t fp_pack(input logic s, input logic signed [7:0] e,
                                    input logic [10:0] m, input logic g,
                                    input logic st);
    logic [11:0] mr;
    logic signed [7:0] er;
    mr = {1'b0, m} + {11'd0, (g && (st || m[0]))};
    er = e;
    if (mr[11]) begin
      mr = mr >> 1;
      er = er + 8'sd1;
    end
    if (er <= 0) return {s, 15'd0};
    if (er >= 31) return {s, 5'd31, 10'd0};
    return {s, er[4:0], mr[9:0]};
  endfunction

  function automatic fp16_t fp_add(input fp16_t a_in, input fp16_t b_in);
    fp16_t a, b;
    logic [4:0] d;
    logic [13:0] ma, mb;
    logic [27:0] ext;
    logic [14:0] sum;
    logic signed [7:0] e;
    a = a_in;
    b = b_in;
    if (fp_is_zero(a)) return fp_is_zero(b) ? FP_ZERO : b;
    if (fp_is_zero(b)) return a;
    if (a[14:10] == 5'd31) return a;
    if (b[14:10] == 5'd31) return b;
    if (b[14:0] > a[14:0]) begin
      a = b_in;
      b = a_in;
    end
    d  = a[14:10] - b[14:10];
    ma = {1'b1, a[9:0], 3'b000};
    ext = {1'b1, b[9:0], 3'b000, 14'd0} >> d;
    mb = ext[27:14];
    mb[0] = mb[0] | (|ext[13:0]);
    e = {3'b000, a[14:10]};
    if (a[15] == b[15]) begin
      sum = {1'b0, ma} + {1'b0, mb};
      if (sum[14]) begin
        sum = {1'b0, sum[14:2], sum[1] | sum[0]};
        e = e + 8'sd1;
      end
    end else begin
      sum = {1'b0, ma} - {1'b0, mb};
      if (sum == 15'd0) return FP_ZERO;
      for (int i = 0; i < 14; i++) begin
        if (!sum[13]) begin
          sum = sum << 1;
          e = e - 8'sd1;
        end
      end
    end
    return fp_pack(a[15], e, sum[13:3], sum[2], |sum[1:0]);
  endfunction

  function automatic fp16_t fp_sub(input fp16_t a, input fp16_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp16_t fp_mul(input fp16_t a, input fp16_t b);
    logic s;
    logic signed [7:0] e;
    logic [21:0] p;
    s = a[15] ^ b[15];
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 15'd0};
    if (a[14:10] == 5'd31 || b[14:10] == 5'd31) return {s, 5'd31, 10'd0};
    e = $signed({3'b000, a[14:10]}) + $signed({3'b000, b[14:10]}) - 8'sd15;
    p = {1'b1, a[9:0]} * {1'b1, b[9:0]};
    if (p[21]) return fp_pack(s, e + 8'sd1, p[21:11], p[10], |p[9:0]);
    return fp_pack(s, e, p[20:10], p[9], |p[8:0]);
  endfunction

  function automatic fp16_t fp_div(input fp16_t a, input fp16_t b);
    logic s;
    logic signed [7:0] e;
    logic [24:0] num, q, r;
    s = a[15] ^ b[15];
    if (fp_is_zero(b) || a[14:10] == 5'd31) return {s, 5'd31, 10'd0};
    if (fp_is_zero(a) || b[14:10] == 5'd31) return {s, 15'd0};
    e = $signed({3'b000, a[14:10]}) - $signed({3'b000, b[14:10]}) + 8'sd15;
    num = {1'b1, a[9:0], 14'd0};
    q = num / {14'd0, 1'b1, b[9:0]};
    r = num % {14'd0, 1'b1, b[9:0]};
    if (q[14]) return fp_pack(s, e, q[14:4], q[3], (|q[2:0]) || (r != 0));
    return fp_pack(s, e - 8'sd1, q[13:3], q[2], (|q[1:0]) || (r != 0));
  endfunction

  function automatic fp16_t fp_sqrt(input fp16_t a);
    logic signed [7:0] ex;
    logic [25:0] rad, rem, root, trial;
    if (fp_is_zero(a) || a[15]) return FP_ZERO;
    if (a[14:10] == 5'd31) return FP_INF;
    ex = $signed({3'b000, a[14:10]}) - 8'sd15;
    if (ex[0]) begin
      rad = {1'b1, a[9:0], 15'd0};   // M * 2^15, exponent made even
      ex = ex - 8'sd1;
    end else begin
      rad = {1'b0, 1'b1, a[9:0], 14'd0}; // M * 2^14
    end
    root = '0;
    rem  = '0;
    for (int i = 12; i >= 0; i--) begin
      rem   = (rem << 2) | ((rad >> (2 * i)) & 26'd3);
      trial = (root << 2) | 26'd1;
      root  = root << 1;
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | 26'd1;
      end
    end
    // root is in [2^12, 2^13) and stands for root * 2^-12
    return fp_pack(1'b0, (ex >>> 1) + 8'sd15, root[12:2], root[1], root[0] || (rem != 0));
  endfunction

  // a < b
  function automatic logic fp_lt(input fp16_t a, input fp16_t b);
    logic az, bz;
    az = fp_is_zero(a);
    bz = fp_is_zero(b);
    if (az && bz) return 1'b0;
    if (az) return !b[15];
    if (bz) return a[15];
    if (a[15] != b[15]) return a[15];
    if (a[15]) return a[14:0] > b[14:0];
    return a[14:0] < b[14:0];
  endfunction

  function automatic fp16_t fp_max0(input fp16_t a);
    return a[15] ? FP_ZERO : a;
  endfunction

  // Signed integer to half precision.
  function automatic fp16_t fp_from_int(input logic signed [31:0] v);
    logic s;
    logic [31:0] mag;
    logic signed [7:0] e;
    s = v[31];
    mag = s ? 32'(-v) : 32'(v);
    if (mag == 0) return FP_ZERO;
    e = 8'sd46; // 31 + 15: value = mag * 2^-31 * 2^31
    for (int i = 0; i < 32; i++) begin
      if (!mag[31]) begin
        mag = mag << 1;
        e = e - 8'sd1;
      end
    end
    return fp_pack(s, e, mag[31:21], mag[20], |mag[19:0]);
  endfunction

  // Half precision scaled by 2^frac_bits, rounded toward minus infinity,
  // saturated to the 32-bit signed range.
  function automatic logic signed [31:0] fp_to_fix(input fp16_t a, input int frac_bits);
    logic signed [7:0] sh;
    logic [63:0] mag;
    logic signed [31:0] r;
    logic lost;
    if (fp_is_zero(a)) return 0;
    sh = $signed({3'b000, a[14:10]}) - 8'sd25 + 8'(frac_bits); // value = M * 2^(e-25)
    mag = {53'd0, 1'b1, a[9:0]};
    lost = 1'b0;
    if (sh >= 0) begin
      if (sh > 8'sd20) return a[15] ? 32'sh8000_0000 : 32'sh7FFF_FFFF;
      mag = mag << sh;
    end else begin
      for (int i = 0; i < 40; i++) begin
        if (i < -int'(sh)) begin
          lost = lost | mag[0];
          mag = mag >> 1;
        end
      end
    end
    r = 32'(mag);
    if (a[15]) r = -r - (lost ? 32'sd1 : 32'sd0);
    return r;
  endfunction

  function automatic logic signed [31:0] fp_floor(input fp16_t a);
    return fp_to_fix(a, 0);
  endfunction

endpackage
