// fp64_mac: one lane of the PE's MAC array, y = a * b + c in IEEE-754 double
// precision.
//
// The product is rounded to double first and the sum is rounded again, both
// to nearest-even, so the result is what two separate double operations give.
// The datapath is purely combinational; the MAC array registers around it.
// Double precision follows the published 64-bit multipliers. Simplifications
// chosen here: subnormal inputs are read as zero and results that would be
// subnormal are flushed to a signed zero; infinities and NaNs are handled
// coarsely (any NaN or inf*0 gives the default quiet NaN, otherwise an
// infinite operand gives infinity, and overflow gives infinity).
module fp64_mac
  import morph_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  input  fp64_t c,
  output fp64_t y
);

  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic is_zero(input fp64_t x);
    return x[62:52] == 11'd0;
  endfunction

  function automatic logic is_inf(input fp64_t x);
    return x[62:52] == 11'h7FF && x[51:0] == '0;
  endfunction

  function automatic logic is_nan(input fp64_t x);
    return x[62:52] == 11'h7FF && x[51:0] != '0;
  endfunction

  // Round a normalised 56-bit mantissa {1, 52 fraction bits, G, R, S} with a
  // signed exponent to a double.
  function automatic fp64_t pack_round(input logic s, input logic signed [13:0] e,
                                       input logic [55:0] m);
    logic [53:0] mr;
    logic signed [13:0] er;
    logic up;
    up = m[2] && (m[1] || m[0] || m[3]);
    mr = {1'b0, m[55:3]} + 54'(up);
    er = e;
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 14'sd1;
    end
    if (er >= 14'sd2047) return {s, 11'h7FF, 52'd0};
    if (er <= 14'sd0)    return {s, 63'd0};
    return {s, er[10:0], mr[51:0]};
  endfunction

  function automatic fp64_t fmul(input fp64_t x, input fp64_t z);
    logic s;
    logic [52:0] mx, mz;
    logic [105:0] p;
    logic [55:0] m;
    logic signed [13:0] e;
    s = x[63] ^ z[63];
    if (is_nan(x) || is_nan(z)) return QNAN;
    if ((is_inf(x) && is_zero(z)) || (is_inf(z) && is_zero(x))) return QNAN;
    if (is_inf(x) || is_inf(z)) return {s, 11'h7FF, 52'd0};
    if (is_zero(x) || is_zero(z)) return {s, 63'd0};
    mx = {1'b1, x[51:0]};
    mz = {1'b1, z[51:0]};
    p  = mx * mz;
    e  = 14'(x[62:52]) + 14'(z[62:52]) - 14'sd1023;
    if (p[105]) begin
      m = {p[105:51], |p[50:0]};
      e = e + 14'sd1;
    end else begin
      m = {p[104:50], |p[49:0]};
    end
    return pack_round(s, e, m);
  endfunction

  function automatic fp64_t fadd(input fp64_t x, input fp64_t z);
    fp64_t op_l, op_s;
    logic [55:0] mb, ms, diff;
    logic [56:0] sum;
    logic [119:0] sh;
    logic [11:0] d;
    logic signed [13:0] e;
    int lz;
    if (is_nan(x) || is_nan(z)) return QNAN;
    if (is_inf(x) && is_inf(z) && (x[63] != z[63])) return QNAN;
    if (is_inf(x)) return x;
    if (is_inf(z)) return z;
    if (is_zero(x) && is_zero(z)) return {x[63] & z[63], 63'd0};
    if (is_zero(x)) return z;
    if (is_zero(z)) return x;
    if (x[62:0] >= z[62:0]) begin
      op_l = x; op_s = z;
    end else begin
      op_l = z; op_s = x;
    end
    d  = 12'(op_l[62:52]) - 12'(op_s[62:52]);
    mb = {1'b1, op_l[51:0], 3'b000};
    sh = {1'b1, op_s[51:0], 3'b000, 64'd0};
    sh = (d > 12'd119) ? 120'd0 : (sh >> d);
    ms = {sh[119:65], sh[64] | (|sh[63:0]) | (d > 12'd119)};
    e  = 14'(op_l[62:52]);
    if (op_l[63] == op_s[63]) begin
      sum = {1'b0, mb} + {1'b0, ms};
      if (sum[56]) begin
        e = e + 14'sd1;
        return pack_round(op_l[63], e, {sum[56:2], sum[1] | sum[0]});
      end
      return pack_round(op_l[63], e, sum[55:0]);
    end
    diff = mb - ms;
    if (diff == '0) return 64'd0;
    lz = 0;
    for (int i = 55; i >= 0; i--) begin
      if (diff[i]) break;
      lz++;
    end
    diff = diff << lz;
    e = e - 14'(lz);
    return pack_round(op_l[63], e, diff);
  endfunction

  always_comb y = fadd(fmul(a, b), c);

endmodule
