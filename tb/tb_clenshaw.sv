// tb_clenshaw: evaluates random Chebyshev series of orders 1 to 6 at random
// points of [-1, 1] (and at the end points) and compares with the direct sum
// sum_j c[j] cos(j acos x) in double precision. The allowed error is 1e-5
// of sum_j |c[j]|, well above single precision rounding over six steps and
// far below the effect of any wrong coefficient or step. The latency from
// the start edge to done must be 3n + 5 cycles.
module tb_clenshaw;
  import lsf_pkg::*;
  import tb_fp_pkg::*;

  localparam int PMAX = 12;
  localparam int NC = PMAX / 2 + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] n;
  fp32_t x, y, coef [NC];
  logic busy, done;
  fp_req_t req;
  fp_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clenshaw #(.PMAX(PMAX)) dut (.clk, .rst_n, .start, .n, .x, .coef, .y,
                               .busy, .done, .fp_req(req), .fp_rsp(rsp));
  fpadd  ua (.a(req.add_a), .b(req.add_b), .y(rsp.add_y));
  fpmult um (.a(req.mul_a), .b(req.mul_b), .y(rsp.mul_y));
  fpdiv  ud (.a(req.div_a), .b(req.div_b), .y(rsp.div_y));

  task automatic run(int order, real xv);
    int cyc;
    real ref_y, mag, th;
    for (int j = 0; j < NC; j++)
      coef[j] = (j <= order) ? to_fp((real'($urandom_range(2000)) - 1000.0) / 300.0) : rand_fp(120, 130);
    x = to_fp(xv);
    n = 4'(order);
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    th = $acos(to_real(x));
    ref_y = 0.0;
    mag = 0.0;
    for (int j = 0; j <= order; j++) begin
      ref_y += to_real(coef[j]) * $cos(real'(j) * th);
      mag += (to_real(coef[j]) < 0.0) ? -to_real(coef[j]) : to_real(coef[j]);
    end
    checks += 2;
    if (cyc != 3 * order + 5) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, 3 * order + 5);
    end
    if ((to_real(y) - ref_y) > 1e-5 * mag || (ref_y - to_real(y)) > 1e-5 * mag) begin
      failures++;
      $display("FAIL n=%0d x=%f: y=%f expected %f", order, to_real(x), to_real(y), ref_y);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n = '0;
    x = '0;
    for (int j = 0; j < NC; j++) coef[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int o = 1; o <= 6; o++) begin
      run(o, 1.0);
      run(o, -1.0);
      run(o, 0.0);
      for (int r = 0; r < 60; r++)
        run(o, (real'($urandom_range(20000)) - 10000.0) / 10000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
