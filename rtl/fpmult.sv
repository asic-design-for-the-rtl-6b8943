// fpmult: combinational IEEE-754 single precision multiplier, y = a * b.
//
// The two 24-bit significands (leading one restored) are multiplied into a
// 48-bit product; one right renormalisation step handles products in [2,4).
// The exponents add with the bias removed once, and the result is rounded to
// nearest, ties to even, from the guard bit and the sticky OR of the rest.
//
// Purely combinational, in line with the design's simple floating point
// units. Simplifications chosen here: subnormal inputs are zero, subnormal
// results are flushed to zero, an infinite or NaN operand gives a signed
// infinity (0 * inf gives 0).
module fpmult
  import lsf_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        s;
    logic [23:0] ma, mb;
    logic [47:0] p;
    logic signed [10:0] e;

    s  = a[31] ^ b[31];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    p  = ma * mb;
    e  = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127;

    if (a[30:23] == 8'd0 || b[30:23] == 8'd0)
      y = {s, 31'd0};
    else if (a[30:23] == 8'hFF || b[30:23] == 8'hFF)
      y = {s, 8'hFF, 23'd0};
    else if (p[47])
      y = fp_pack(s, e + 11'sd1, p[47:24], p[23], |p[22:0]);
    else
      y = fp_pack(s, e, p[46:23], p[22], |p[21:0]);
  end

endmodule
