// fpadd: combinational IEEE-754 single precision adder, y = a + b.
//
// Subtraction is done by flipping the sign of b before it reaches this unit.
// The operand of larger magnitude is taken as the reference; the other
// significand is shifted right to the same exponent, keeping a guard bit, a
// round bit and a sticky bit. Like signs add (at most a one-bit
// renormalisation to the right), unlike signs subtract (a leading-zero count
// and left shift renormalise). The result is rounded to nearest, ties to even.
//
// The unit is purely combinational, as the design's floating point units
// are; it is meant for evaluating the LSF datapath, not as an optimised
// adder. Simplifications chosen here: subnormal inputs are read as zero and
// subnormal results flushed to zero; an infinite or NaN operand is passed
// through unchanged (inf - inf therefore gives inf, not NaN); an exact zero
// sum is +0 unless both operands are -0.
module fpadd
  import lsf_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  function automatic logic [4:0] lzc27(logic [26:0] v);
    logic [4:0] n;
    n = 5'd27;
    for (int i = 0; i < 27; i++)
      if (v[i]) n = 5'(26 - i);
    return n;
  endfunction

  always_comb begin
    logic        swap;
    fp32_t       x, z;              // |x| >= |z|
    logic [7:0]  ex, ez, d;
    logic [23:0] mx, mz;
    logic [26:0] zx, zs, mask;
    logic        st;
    logic [27:0] sum;
    logic [26:0] r;
    logic [4:0]  lz;
    logic signed [10:0] e;

    // Magnitude compare with subnormals counted as zero.
    swap = {(b[30:23] != 8'd0) ? b[30:0] : 31'd0} > {(a[30:23] != 8'd0) ? a[30:0] : 31'd0};
    x  = swap ? b : a;
    z  = swap ? a : b;
    ex = x[30:23];
    ez = z[30:23];
    mx = (ex != 8'd0) ? {1'b1, x[22:0]} : 24'd0;
    mz = (ez != 8'd0) ? {1'b1, z[22:0]} : 24'd0;
    d  = ex - ez;

    // Align the smaller operand: 24 significand bits + guard + round + sticky.
    zx   = {mz, 3'b000};
    mask = '0;
    st   = 1'b0;
    if (d >= 8'd27) begin
      zs = {26'd0, |mz};
    end else begin
      mask = (27'd1 << d) - 27'd1;
      st   = |(zx & mask);
      zs   = (zx >> d) | {26'd0, st};
    end

    sum = '0;
    r   = '0;
    lz  = '0;
    e   = 11'(ex);
    if (ex == 8'hFF) begin
      y = x;
    end else if (ex == 8'd0) begin
      y = {x[31] & z[31], 31'd0};
    end else if (x[31] == z[31]) begin
      sum = {1'b0, mx, 3'b000} + {1'b0, zs};
      if (sum[27]) begin
        r = {sum[27:2], sum[1] | sum[0]};
        e = e + 11'sd1;
      end else begin
        r = sum[26:0];
      end
      y = fp_pack(x[31], e, r[26:3], r[2], |r[1:0]);
    end else begin
      r = {mx, 3'b000} - zs;
      if (r == 27'd0) begin
        y = FP_ZERO;
      end else begin
        lz = lzc27(r);
        r  = r << lz;
        e  = e - 11'(lz);
        y  = fp_pack(x[31], e, r[26:3], r[2], |r[1:0]);
      end
    end
  end

endmodule
