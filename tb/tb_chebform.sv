// tb_chebform: checks the Chebyshev rearrangement c[M-k] = 2 g[k]
// (k < M), c[0] = g[M], for both series at once, with equal orders (6/6,
// 5/5) and unequal orders (6/5, as for an odd LP order), the zero fill above
// M, and the latency of max(M1, M2) + 2 cycles from the start edge to done.
module tb_chebform;
  import lsf_pkg::*;
  import tb_fp_pkg::*;

  localparam int PMAX = 12;
  localparam int NC = PMAX / 2 + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] m1, m2;
  fp32_t g1 [NC], g2 [NC], c1 [NC], c2 [NC];
  logic busy, done;
  fp_req_t req;
  fp_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  chebform #(.PMAX(PMAX)) dut (.clk, .rst_n, .start, .m1, .m2, .g1, .g2, .c1, .c2,
                               .busy, .done, .fp_req(req), .fp_rsp(rsp));
  fpadd  ua (.a(req.add_a), .b(req.add_b), .y(rsp.add_y));
  fpmult um (.a(req.mul_a), .b(req.mul_b), .y(rsp.mul_y));
  fpdiv  ud (.a(req.div_a), .b(req.div_b), .y(rsp.div_y));

  function automatic logic [31:0] want(fp32_t g [NC], int m, int j);
    if (j > m) return 32'h0;
    if (j == 0) return g[m];
    return to_fp(2.0 * to_real(g[m - j]));
  endfunction

  task automatic run(int n1, int n2);
    int cyc, mx;
    mx = (n1 > n2) ? n1 : n2;
    for (int k = 0; k < NC; k++) begin
      g1[k] = (k == 0) ? 32'h3F80_0000 : rand_fp(110, 135);
      g2[k] = (k == 0) ? 32'h3F80_0000 : rand_fp(110, 135);
    end
    m1 = 4'(n1);
    m2 = 4'(n2);
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks++;
    if (cyc != mx + 2) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, mx + 2);
    end
    for (int j = 0; j < NC; j++) begin
      checks += 2;
      if (c1[j] !== want(g1, n1, j)) begin
        failures++;
        $display("FAIL c1[%0d] = %h, expected %h", j, c1[j], want(g1, n1, j));
      end
      if (c2[j] !== want(g2, n2, j)) begin
        failures++;
        $display("FAIL c2[%0d] = %h, expected %h", j, c2[j], want(g2, n2, j));
      end
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m1 = '0;
    m2 = '0;
    for (int k = 0; k < NC; k++) begin
      g1[k] = '0;
      g2[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      run(6, 6);
      run(5, 5);
      run(6, 5);
      run(1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
