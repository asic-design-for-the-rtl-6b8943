// fpdiv: combinational IEEE-754 single precision divider, y = a / b.
//
// The dividend significand, extended by 25 zero bits, is divided by the
// divisor significand with an integer divider. The 25- or 26-bit quotient
// holds the 24 result bits and a guard bit; the remainder and any quotient
// bit below the guard form the sticky bit. Rounding is to nearest, ties to
// even.
//
// Purely combinational, in line with the design's simple floating point
// units. Simplifications chosen here: subnormals are zero on input and
// output; x / 0 gives a signed infinity (0 / 0 included), x / inf gives a
// signed zero, inf / x gives a signed infinity.
module fpdiv
  import lsf_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        s;
    logic [48:0] num;
    logic [48:0] den;
    logic [48:0] q, r;
    logic signed [10:0] e;

    s   = a[31] ^ b[31];
    num = {1'b1, a[22:0], 25'd0};
    den = {25'd0, 1'b1, b[22:0]};
    q   = num / den;
    r   = num % den;
    e   = 11'(a[30:23]) - 11'(b[30:23]) + 11'sd127;

    if (b[30:23] == 8'd0 || a[30:23] == 8'hFF)
      y = {s, 8'hFF, 23'd0};
    else if (a[30:23] == 8'd0 || b[30:23] == 8'hFF)
      y = {s, 31'd0};
    else if (q[25])
      y = fp_pack(s, e, q[25:2], q[1], q[0] | (r != '0));
    else
      y = fp_pack(s, e - 11'sd1, q[24:1], q[0], r != '0);
  end

endmodule
