// tb_fp_pkg: reference conversions between single precision bit patterns
// and the simulator's double precision reals, used by the testbenches.
//
// to_real widens a single exactly (subnormals read as zero). to_fp rounds a
// double to the nearest single, ties to even, flushing results below the
// normal range to zero, the same conventions as the datapath's units. Since
// a double carries more than twice the bits of a single plus two, a sum,
// product or quotient of two singles computed in double precision and then
// rounded by to_fp equals the correctly rounded single result.
package tb_fp_pkg;

  function automatic real to_real(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(f[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] to_fp(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && (d[27:0] != 0 || d[29])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // A random normal single with exponent field in [elo, ehi].
  function automatic logic [31:0] rand_fp(int elo, int ehi);
    logic [7:0] e;
    e = 8'(elo + int'($urandom_range(32'(ehi - elo))));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
