// tb_atopq: drives atopq with random LP coefficients for orders 12, 10, 11
// and 2, and checks every output coefficient against
//   f1[k] = round(-a(k) - a(P+1-k)),  f2[k] = round(a(P+1-k) - a(k)),
// computed in double precision and rounded to single, plus the zero fill
// above floor((P+1)/2) and the latency of 2*floor((P+1)/2) + 1 cycles from
// the start edge to done.
module tb_atopq;
  import lsf_pkg::*;
  import tb_fp_pkg::*;

  localparam int PMAX = 12;
  localparam int NC = PMAX / 2 + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] p_order;
  fp32_t a_coef [PMAX], f1 [NC], f2 [NC];
  logic busy, done;
  fp_req_t req;
  fp_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  atopq #(.PMAX(PMAX)) dut (.clk, .rst_n, .start, .p_order, .a_coef, .f1, .f2,
                            .busy, .done, .fp_req(req), .fp_rsp(rsp));
  fpadd  ua (.a(req.add_a), .b(req.add_b), .y(rsp.add_y));
  fpmult um (.a(req.mul_a), .b(req.mul_b), .y(rsp.mul_y));
  fpdiv  ud (.a(req.div_a), .b(req.div_b), .y(rsp.div_y));

  task automatic expect_eq(string what, int k, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s[%0d] = %h, expected %h", what, k, got, want);
    end
  endtask

  task automatic run(int p);
    int cyc, nh;
    nh = (p + 1) / 2;
    for (int i = 0; i < PMAX; i++)
      a_coef[i] = (i < p) ? to_fp((real'($urandom_range(2000)) - 1000.0) / 400.0) : 32'h0;
    p_order = 4'(p);
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    checks++;
    if (cyc != 2 * nh + 1) begin
      failures++;
      $display("FAIL P=%0d latency %0d, expected %0d", p, cyc, 2 * nh + 1);
    end
    expect_eq("f1", 0, f1[0], 32'h3F80_0000);
    expect_eq("f2", 0, f2[0], 32'h3F80_0000);
    for (int k = 1; k < NC; k++) begin
      if (k <= nh) begin
        expect_eq("f1", k, f1[k], to_fp(-to_real(a_coef[k-1]) - to_real(a_coef[p-k])));
        expect_eq("f2", k, f2[k], to_fp(to_real(a_coef[p-k]) - to_real(a_coef[k-1])));
      end else begin
        expect_eq("f1", k, f1[k], 32'h0);
        expect_eq("f2", k, f2[k], 32'h0);
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
    p_order = '0;
    for (int i = 0; i < PMAX; i++) a_coef[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      run(12);
      run(10);
      run(11);
      run(2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
