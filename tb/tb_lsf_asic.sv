// tb_lsf_asic: end-to-end test of the LSF converter at its default size
// (PMAX = 12). Each frame starts from known LSFs: P values x_i = cos(w_i),
// at least 0.03 apart, are dealt alternately to the symmetric and the
// antisymmetric polynomial, which are built as
//   F1(z) = (1 + z^-1) prod (1 - 2 x_i z^-1 + z^-2)      (P even)
//   F2(z) = (1 - z^-1) prod (1 - 2 x_i z^-1 + z^-2)      (P even)
// (for odd P, F1 has no trivial factor and F2 has (1 - z^-2)), and the LP
// coefficients follow as a(k) = -(F1[k] + F2[k]) / 2, rounded to single.
// The converter must return P LSFs, without error, in ascending order. The
// reference roots are those of the single-rounded coefficients, found in
// double precision by a fine scan and bisection; each |cos(lsf) - root| must
// be within one fine search step (0.0015): half a step for the midpoint
// estimate and the rest for single precision rounding in the series
// evaluation. The largest errors are printed.
//
// Frames with P = 12 (speaker recognition), P = 10 (speech coding) and
// P = 11 (odd order) run back to back, plus frames with a root near x = -1
// and near x = +1, and one frame of each order from 2 to 9. The test counts
// how often each mechanism of the design occurs and fails if one never does: both even- and odd-order deflation,
// coarse and fine steps, a fine step stopped at the coarse lower bound, the
// last coarse step clamped to -1, switches between the two series, negative
// roots mapped through pi - arccos, and frames that run back to back.
module tb_lsf_asic;
  import lsf_pkg::*;
  import tb_fp_pkg::*;

  localparam int PMAX = 12;
  localparam int PW = 4;
  // State encodings of the sub-blocks, in their declaration order.
  localparam int RF_CSTEP = 3, RF_FSTEP = 6;
  localparam int AC_FIX = 9;
  // Allowed root error in x: half a fine step for the midpoint estimate,
  // plus as much again for the single precision series evaluation, whose
  // rounding moves the observed sign change near clustered roots.
  localparam real TOL = 0.0015;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [PW-1:0] p_order, nlsf;
  fp32_t a_coef [PMAX], lsf [PMAX];
  logic err, busy, done;
  int checks = 0, failures = 0;
  real xt [PMAX];

  // Mechanism counters
  int n_even = 0, n_odd = 0, n_coarse = 0, n_fine = 0, n_fine_clamp = 0;
  int n_coarse_clamp = 0, n_switch = 0, n_reflect = 0, n_frames = 0;
  int cyc_max = 0, cyc_sum = 0;
  logic prev_sel = 1'b0;
  real err_true = 0.0, err_ref = 0.0;
  real xr [PMAX];   // roots of the single-rounded coefficients, in double

  // Series value in double precision from the rounded LP coefficients:
  // which = 0 for G1, 1 for G2, evaluated directly on the unit circle as
  // e^{jMw} G(e^{jw}) = 2 sum_{k<M} g[k] cos((M-k)w) + g[M].
  function automatic real gval(int p, int which, real x);
    real am [PMAX + 2], f [PMAX + 2], g [PMAX + 2];
    real w, s;
    int m;
    for (int k = 0; k < PMAX + 2; k++) am[k] = 0.0;
    am[0] = 1.0;
    for (int k = 1; k <= p; k++) am[k] = -to_real(a_coef[k-1]);
    for (int k = 0; k <= p + 1; k++)
      f[k] = (which == 0) ? am[k] + am[p+1-k] : am[k] - am[p+1-k];
    m = (which == 0) ? (p + 1) / 2 : p / 2;
    for (int k = 0; k <= m; k++) begin
      if (p % 2 == 0) g[k] = f[k] + ((k > 0) ? ((which == 0) ? -g[k-1] : g[k-1]) : 0.0);
      else            g[k] = f[k] + ((which == 1 && k > 1) ? g[k-2] : 0.0);
    end
    w = $acos(x);
    s = g[m];
    for (int k = 0; k < m; k++) s += 2.0 * g[k] * $cos(real'(m - k) * w);
    return s;
  endfunction

  // All roots of G1 and G2 by a fine scan plus bisection, descending.
  task automatic ref_roots(int p);
    int n;
    real x0, x1, y0, y1, lo, hi, ym, t;
    n = 0;
    for (int which = 0; which < 2; which++) begin
      x0 = 1.0;
      y0 = gval(p, which, x0);
      for (int s = 1; s <= 4000; s++) begin
        x1 = 1.0 - real'(s) / 2000.0;
        y1 = gval(p, which, x1);
        if ((y0 < 0.0) != (y1 < 0.0) && n < PMAX) begin
          hi = x0; lo = x1;
          for (int b = 0; b < 60; b++) begin
            ym = gval(p, which, (hi + lo) / 2.0);
            if ((ym < 0.0) == (y0 < 0.0)) hi = (hi + lo) / 2.0;
            else lo = (hi + lo) / 2.0;
          end
          xr[n] = (hi + lo) / 2.0;
          n++;
        end
        x0 = x1;
        y0 = y1;
      end
    end
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        if (xr[j] > xr[i]) begin
          t = xr[i]; xr[i] = xr[j]; xr[j] = t;
        end
  endtask

  always #5 clk = ~clk;

  lsf_asic dut (.clk, .rst_n, .start, .p_order, .a_coef, .lsf, .nlsf, .err, .busy, .done);

  always @(posedge clk) if (rst_n) begin
    if (int'(dut.u_rootfinder.state) == RF_CSTEP && fp_lt(dut.rsp.add_y, 32'hBF80_0000)
        && dut.u_rootfinder.xc != 32'hBF80_0000)
      n_coarse_clamp++;
    if (int'(dut.u_rootfinder.state) == RF_CSTEP) n_coarse++;
    if (int'(dut.u_rootfinder.state) == RF_FSTEP) begin
      n_fine++;
      if (!fp_lt(dut.u_rootfinder.xlo, dut.rsp.add_y)) n_fine_clamp++;
    end
    if (dut.u_rootfinder.busy && dut.u_rootfinder.sel != prev_sel) n_switch++;
    prev_sel <= dut.u_rootfinder.sel;
    if (int'(dut.u_acos.state) == AC_FIX && dut.u_acos.neg) n_reflect++;
  end

  // Polynomial helpers: multiply poly (length len) in place by (c0 + c1 z^-1 + c2 z^-2).
  task automatic pmul(inout real pc [PMAX + 2], inout int len, input real c0, input real c1, input real c2);
    real t [PMAX + 2];
    for (int k = 0; k < PMAX + 2; k++) t[k] = 0.0;
    for (int k = 0; k < len; k++) begin
      t[k] += c0 * pc[k];
      if (k + 1 < PMAX + 2) t[k+1] += c1 * pc[k];
      if (k + 2 < PMAX + 2) t[k+2] += c2 * pc[k];
    end
    pc = t;
    len = len + ((c2 != 0.0) ? 2 : 1);
  endtask

  task automatic frame(int p, real top_x, real bottom_x);
    real f1 [PMAX + 2], f2 [PMAX + 2];
    int l1, l2, cyc;
    real d;
    // Roots, descending, at least 0.03 apart.
    xt[0] = (top_x > 0.0) ? top_x : 0.97 - real'($urandom_range(1000)) / 10000.0;
    for (int i = 1; i < PMAX; i++)
      xt[i] = xt[i-1] - 0.03 - real'($urandom_range(1000)) * 0.00012;
    if (bottom_x < 0.0) xt[p-1] = bottom_x;
    for (int k = 0; k < PMAX + 2; k++) begin
      f1[k] = 0.0;
      f2[k] = 0.0;
    end
    f1[0] = 1.0;
    f2[0] = 1.0;
    l1 = 1;
    l2 = 1;
    if (p % 2 == 0) begin
      pmul(f1, l1, 1.0, 1.0, 0.0);
      pmul(f2, l2, 1.0, -1.0, 0.0);
    end else begin
      pmul(f2, l2, 1.0, 0.0, -1.0);
    end
    for (int i = 0; i < p; i++)
      if (i % 2 == 0) pmul(f1, l1, 1.0, -2.0 * xt[i], 1.0);
      else            pmul(f2, l2, 1.0, -2.0 * xt[i], 1.0);
    for (int k = 0; k < PMAX; k++)
      a_coef[k] = (k < p) ? to_fp(-(f1[k+1] + f2[k+1]) / 2.0) : 32'h0;
    p_order = PW'(p);
    ref_roots(p);
    if (p % 2 == 0) n_even++; else n_odd++;

    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    #1;
    n_frames++;
    cyc_sum += cyc;
    if (cyc > cyc_max) cyc_max = cyc;

    checks += 2;
    if (err) begin
      failures++;
      $display("FAIL P=%0d: err set", p);
    end
    if (int'(nlsf) != p) begin
      failures++;
      $display("FAIL P=%0d: %0d LSFs", p, nlsf);
    end
    for (int i = 0; i < PMAX; i++) begin
      checks++;
      if (i < p) begin
        d = $cos(to_real(lsf[i])) - xt[i];
        if (d > err_true) err_true = d;
        if (-d > err_true) err_true = -d;
        d = $cos(to_real(lsf[i])) - xr[i];
        if (d > err_ref) err_ref = d;
        if (-d > err_ref) err_ref = -d;
        if (d > TOL || d < -TOL || (i > 0 && !(to_real(lsf[i]) > to_real(lsf[i-1])))) begin
          failures++;
          $display("FAIL P=%0d lsf[%0d] = %f rad (cos %f), expected cos %f",
                   p, i, to_real(lsf[i]), $cos(to_real(lsf[i])), xr[i]);
        end
      end else if (lsf[i] !== 32'h0) begin
        failures++;
        $display("FAIL P=%0d lsf[%0d] = %h, expected 0", p, i, lsf[i]);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p_order = '0;
    for (int i = 0; i < PMAX; i++) a_coef[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 12; r++) begin
      frame(12, 0.0, 0.0);
      frame(10, 0.0, 0.0);
      frame(11, 0.0, 0.0);
    end
    for (int q = 2; q <= 9; q++) frame(q, 0.0, 0.0);
    frame(12, 0.999, -0.9993);
    frame(10, 0.0, -0.9991);
    frame(11, 0.9985, -0.9996);
    $display("mechanisms:");
    need("frames", n_frames);
    need("even-order deflation (1+-z^-1)", n_even);
    need("odd-order deflation (1-z^-2)", n_odd);
    need("coarse steps", n_coarse);
    need("fine steps", n_fine);
    need("fine step stopped at coarse bound", n_fine_clamp);
    need("coarse step clamped to -1", n_coarse_clamp);
    need("switches between G1 and G2", n_switch);
    need("negative roots (pi - arccos)", n_reflect);
    $display("largest root error: %.6f against the double precision roots, %.6f against the LSFs the frame was built from", err_ref, err_true);
    $display("cycles per frame: max %0d, mean %0d", cyc_max, cyc_sum / n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
