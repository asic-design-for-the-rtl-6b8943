// tb_acos_unit: converts batches of values in [-1, 1] (random ones, 0, the
// end points +-1, and values within 1e-6 of them) and compares every
// result with the double precision arccosine; the error allowed is 2e-6 rad.
// Batches of different sizes check that exactly n outputs are written and
// the rest are zero.
module tb_acos_unit;
  import lsf_pkg::*;
  import tb_fp_pkg::*;

  localparam int PMAX = 12;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] n;
  fp32_t x [PMAX], lsf [PMAX];
  logic busy, done;
  fp_req_t req;
  fp_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acos_unit #(.PMAX(PMAX)) dut (.clk, .rst_n, .start, .n, .x, .lsf,
                                .busy, .done, .fp_req(req), .fp_rsp(rsp));
  fpadd  ua (.a(req.add_a), .b(req.add_b), .y(rsp.add_y));
  fpmult um (.a(req.mul_a), .b(req.mul_b), .y(rsp.mul_y));
  fpdiv  ud (.a(req.div_a), .b(req.div_b), .y(rsp.div_y));

  task automatic run(int cnt, real xs [PMAX]);
    real want, d;
    for (int i = 0; i < PMAX; i++) x[i] = to_fp(xs[i]);
    n = 4'(cnt);
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    for (int i = 0; i < PMAX; i++) begin
      checks++;
      if (i < cnt) begin
        want = $acos(to_real(x[i]));
        d = to_real(lsf[i]) - want;
        if (d > 2e-6 || d < -2e-6) begin
          failures++;
          $display("FAIL acos(%.9f) = %.9f, expected %.9f", to_real(x[i]), to_real(lsf[i]), want);
        end
      end else if (lsf[i] !== 32'h0) begin
        failures++;
        $display("FAIL lsf[%0d] = %h beyond n", i, lsf[i]);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xs [PMAX];
    n = '0;
    for (int i = 0; i < PMAX; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    xs = '{1.0, -1.0, 0.0, 0.999999, -0.999999, 0.5, -0.5, 0.99, -0.99, 1e-4, -1e-4, 0.7071};
    run(12, xs);
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < PMAX; i++) xs[i] = (real'($urandom_range(200000)) - 100000.0) / 100000.0;
      run(1 + (r % 12), xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
