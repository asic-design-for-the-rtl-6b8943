// lsf_pkg: types, constants and small helper functions shared by the
// line-spectral-frequency (LSF) datapath.
//
// All numbers in the datapath are IEEE-754 single precision words (fp32_t).
// Every sequential entity talks to the shared floating point units through
// one request bundle (fp_req_t: operands for the adder, multiplier and
// divider) and one response bundle (fp_rsp_t: their three results). The units
// are combinational, so an entity puts operands on the request in one state
// and registers the result on the clock edge that leaves that state.
//
// The constants are the search steps of the root finder (coarse 0.02, fine
// 0.0015, as the algorithm prescribes) and the coefficients of the
// arccosine approximation, which is this design's own choice (see acos_unit).
package lsf_pkg;

  typedef logic [31:0] fp32_t;

  // Requests to the shared floating point units.
  typedef struct packed {
    fp32_t add_a;
    fp32_t add_b;
    fp32_t mul_a;
    fp32_t mul_b;
    fp32_t div_a;
    fp32_t div_b;
  } fp_req_t;

  // Results of the shared floating point units.
  typedef struct packed {
    fp32_t add_y;
    fp32_t mul_y;
    fp32_t div_y;
  } fp_rsp_t;


  // Deflation selector of polydiv: which trivial factor is divided out.
  typedef enum logic [1:0] {
    DEFL_NONE = 2'd0,  // G = F               (P odd, symmetric polynomial)
    DEFL_P1   = 2'd1,  // G = F / (1 + z^-1)  (P even, symmetric polynomial)
    DEFL_M1   = 2'd2,  // G = F / (1 - z^-1)  (P even, antisymmetric polynomial)
    DEFL_M2   = 2'd3   // G = F / (1 - z^-2)  (P odd, antisymmetric polynomial)
  } defl_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;  //  1.0
  localparam fp32_t FP_NEG_ONE = 32'hBF80_0000;  // -1.0
  localparam fp32_t FP_TWO     = 32'h4000_0000;  //  2.0
  localparam fp32_t FP_HALF    = 32'h3F00_0000;  //  0.5
  localparam fp32_t FP_PI      = 32'h4049_0FDB;  //  pi
  localparam fp32_t FP_NEG_COARSE = 32'hBCA3_D70A;  // -0.02
  localparam fp32_t FP_NEG_FINE   = 32'hBAC4_9BA6;  // -0.0015

  // acos(x) ~= sqrt(1-x) * sum_k ACOS_C[k] x^k on 0 <= x <= 1, |error| <= 2.2e-8
  // (eighth-order minimax fit, the classic Hastings approximation).
  localparam int ACOS_TERMS = 8;
  localparam fp32_t ACOS_C [ACOS_TERMS] = '{
    32'h3FC9_0FDA,  //  1.5707963050
    32'hBE5B_BFCA,  // -0.2145988016
    32'h3DB6_3A9E,  //  0.0889789874
    32'hBD4D_8392,  // -0.0501743046
    32'h3CFD_10F8,  //  0.0308918810
    32'hBC8B_FC66,  // -0.0170881256
    32'h3BDA_90C5,  //  0.0066700901
    32'hBAA5_7A2C   // -0.0012624911
  };

  function automatic fp32_t fp_neg(fp32_t v);
    return {~v[31], v[30:0]};
  endfunction

  function automatic fp32_t fp_abs(fp32_t v);
    return {1'b0, v[30:0]};
  endfunction

  // Order-preserving key: unsigned comparison of keys orders the floats.
  function automatic logic [31:0] fp_key(fp32_t v);
    return v[31] ? ~v : {1'b1, v[30:0]};
  endfunction

  // a < b for finite floats (a -0 compares below +0).
  function automatic logic fp_lt(fp32_t a, fp32_t b);
    return fp_key(a) < fp_key(b);
  endfunction

  // Round-to-nearest-even and pack. m is the 24-bit significand with its
  // leading one, g the bit below it, st the OR of all bits further below.
  // Results too large become infinity, results below the normal range
  // become a signed zero (no subnormals).
  function automatic fp32_t fp_pack(logic s, logic signed [10:0] e, logic [23:0] m,
                                    logic g, logic st);
    logic [24:0] mr;
    logic signed [10:0] er;
    mr = {1'b0, m} + {24'd0, g & (st | m[0])};
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 11'sd1;
    end
    if (er >= 11'sd255) return {s, 8'hFF, 23'd0};
    if (er <= 11'sd0) return {s, 31'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

endpackage
