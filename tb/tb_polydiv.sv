// tb_polydiv: checks all four deflation modes of polydiv. For random
// coefficient vectors the expected quotient is built with the textbook
// recurrence for each divisor, each step rounded to single in double
// precision arithmetic. A second test divides an exact product, e.g.
// (1 + z^-1) * G(z) with small-integer G, and must get G back exactly.
// The latency from the start edge to done must be M + 1 cycles.
module tb_polydiv;
  import lsf_pkg::*;
  import tb_fp_pkg::*;

  localparam int PMAX = 12;
  localparam int NC = PMAX / 2 + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  defl_t mode;
  logic [3:0] m_len;
  fp32_t f [NC], g [NC];
  logic busy, done;
  fp_req_t req;
  fp_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  polydiv #(.PMAX(PMAX)) dut (.clk, .rst_n, .start, .mode, .m_len, .f, .g,
                              .busy, .done, .fp_req(req), .fp_rsp(rsp));
  fpadd  ua (.a(req.add_a), .b(req.add_b), .y(rsp.add_y));
  fpmult um (.a(req.mul_a), .b(req.mul_b), .y(rsp.mul_y));
  fpdiv  ud (.a(req.div_a), .b(req.div_b), .y(rsp.div_y));

  task automatic go(defl_t md, int m);
    int cyc;
    mode  = md;
    m_len = 4'(m);
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks++;
    if (cyc != m + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, m + 1);
    end
  endtask

  task automatic check_random(defl_t md, int m);
    real gr [NC];
    f[0] = 32'h3F80_0000;
    for (int k = 1; k < NC; k++) f[k] = to_fp((real'($urandom_range(4000)) - 2000.0) / 700.0);
    go(md, m);
    gr[0] = to_real(f[0]);
    for (int k = 1; k <= m; k++) begin
      case (md)
        DEFL_P1: gr[k] = to_real(to_fp(to_real(f[k]) - gr[k-1]));
        DEFL_M1: gr[k] = to_real(to_fp(to_real(f[k]) + gr[k-1]));
        DEFL_M2: gr[k] = to_real(to_fp(to_real(f[k]) + ((k >= 2) ? gr[k-2] : 0.0)));
        default: gr[k] = to_real(f[k]);
      endcase
    end
    for (int k = 0; k < NC; k++) begin
      checks++;
      if (g[k] !== ((k <= m) ? to_fp(gr[k]) : 32'h0)) begin
        failures++;
        $display("FAIL mode %0d g[%0d] = %h, expected %h", md, k, g[k], to_fp(gr[k]));
      end
    end
  endtask

  // F = D(z) * G(z) with integer G: the quotient must be exact.
  task automatic check_exact(defl_t md, int m);
    int gi [NC + 2], fi [NC + 2];
    gi[0] = 1;
    for (int k = 1; k < NC + 2; k++) gi[k] = int'($urandom_range(20)) - 10;
    for (int k = 0; k < NC; k++) begin
      case (md)
        DEFL_P1: fi[k] = gi[k] + ((k >= 1) ? gi[k-1] : 0);
        DEFL_M1: fi[k] = gi[k] - ((k >= 1) ? gi[k-1] : 0);
        DEFL_M2: fi[k] = gi[k] - ((k >= 2) ? gi[k-2] : 0);
        default: fi[k] = gi[k];
      endcase
      f[k] = to_fp(real'(fi[k]));
    end
    go(md, m);
    for (int k = 0; k <= m; k++) begin
      checks++;
      if (g[k] !== to_fp(real'(gi[k]))) begin
        failures++;
        $display("FAIL exact mode %0d g[%0d] = %h, expected %0d", md, k, g[k], gi[k]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode  = DEFL_NONE;
    m_len = '0;
    for (int k = 0; k < NC; k++) f[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      check_random(DEFL_P1, 6);
      check_random(DEFL_M1, 5);
      check_random(DEFL_M2, 5);
      check_random(DEFL_NONE, 6);
      check_exact(DEFL_P1, 6);
      check_exact(DEFL_M1, 6);
      check_exact(DEFL_M2, 5);
      check_exact(DEFL_NONE, 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
