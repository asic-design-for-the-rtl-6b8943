// tb_rootfinder: tests the coarse/fine root search on its own. The series
// evaluator is replaced by a behavioural model that answers each request a
// few cycles later with y = prod_i (x - r_i) over the known roots of the
// selected series, rounded to single. Roots are drawn at random, at least
// 0.03 apart, and dealt alternately to G1 and G2 (G1 holding the largest).
// Every reported root must lie within half a fine step (0.00075) of the
// true one, for P = 12, 10 and 11, and for a root close to x = -1, which
// needs the last coarse step clamped to -1. A case with the last root of
// G2 missing must end with err = 1 and 11 roots found.
module tb_rootfinder;
  import lsf_pkg::*;
  import tb_fp_pkg::*;

  localparam int PMAX = 12;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] p_order, nroots;
  fp32_t roots [PMAX];
  logic err, busy, done;
  logic ev_start, ev_sel, ev_done = 1'b0;
  fp32_t ev_x, ev_y = '0;
  fp_req_t req;
  fp_rsp_t rsp;
  int checks = 0, failures = 0;
  int clamps = 0;

  real rt [PMAX];        // true roots, descending
  int  nr1, nr2;         // how many roots each series has
  int  skip_g2 = -1;     // index of a root left out of G2 (-1: none)

  always #5 clk = ~clk;

  rootfinder #(.PMAX(PMAX)) dut (
    .clk, .rst_n, .start, .p_order, .roots, .nroots, .err, .busy, .done,
    .eval_start(ev_start), .eval_sel(ev_sel), .eval_x(ev_x), .eval_y(ev_y),
    .eval_done(ev_done), .fp_req(req), .fp_rsp(rsp));
  fpadd  ua (.a(req.add_a), .b(req.add_b), .y(rsp.add_y));
  fpmult um (.a(req.mul_a), .b(req.mul_b), .y(rsp.mul_y));
  fpdiv  ud (.a(req.div_a), .b(req.div_b), .y(rsp.div_y));

  // Behavioural series evaluator.
  always @(posedge clk) begin
    if (ev_start) begin
      real xv, yv;
      logic sl;
      xv = to_real(ev_x);
      sl = ev_sel;
      if (xv < -1.0) begin
        failures++;
        $display("FAIL evaluation requested below -1: %f", xv);
      end
      if (xv == -1.0) clamps++;
      yv = 1.0;
      for (int i = 0; i < int'(p_order); i++)
        if ((i % 2) == int'(sl) && i != skip_g2) yv = yv * (xv - rt[i]);
      repeat (3) @(posedge clk);
      ev_y <= to_fp(yv);
      ev_done <= 1'b1;
      @(posedge clk);
      ev_done <= 1'b0;
    end
  end

  task automatic go(int p);
    p_order = 4'(p);
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    #1;
  endtask

  task automatic check_found(int p, int want_n, bit want_err);
    real d;
    checks += 2;
    if (int'(nroots) != want_n) begin
      failures++;
      $display("FAIL P=%0d found %0d roots, expected %0d", p, nroots, want_n);
    end
    if (err != want_err) begin
      failures++;
      $display("FAIL P=%0d err=%0d, expected %0d", p, err, want_err);
    end
    for (int i = 0; i < want_n; i++) begin
      d = to_real(roots[i]) - rt[i];
      checks++;
      if (d > 0.00075 + 1e-6 || d < -0.00075 - 1e-6) begin
        failures++;
        $display("FAIL P=%0d root %0d = %f, expected %f", p, i, to_real(roots[i]), rt[i]);
      end
    end
  endtask

  task automatic draw(int p);
    rt[0] = 0.97 - real'($urandom_range(1000)) / 10000.0;
    for (int i = 1; i < PMAX; i++)
      rt[i] = rt[i-1] - 0.03 - real'($urandom_range(1000)) * 0.00012;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p_order = '0;
    for (int i = 0; i < PMAX; i++) rt[i] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 6; r++) begin
      draw(12); go(12); check_found(12, 12, 1'b0);
      draw(10); go(10); check_found(10, 10, 1'b0);
      draw(11); go(11); check_found(11, 11, 1'b0);
    end
    // Last root just above -1: the coarse walk must stop at -1 exactly.
    clamps = 0;
    draw(10);
    rt[9] = -0.9993;
    go(10);
    check_found(10, 10, 1'b0);
    checks++;
    if (clamps == 0) begin
      failures++;
      $display("FAIL no evaluation at x = -1");
    end
    // Last root (of G2) missing: 11 roots are found, then the walk reaches -1.
    draw(12);
    skip_g2 = 11;
    go(12);
    check_found(12, 11, 1'b1);
    skip_g2 = -1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
