// tb_fpdiv: self-checking test of the combinational single precision
// divider against the double precision quotient rounded to single, over
// random operands, exact quotients, and division of and by zero.
module tb_fpdiv;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fpdiv dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] forced = 32'h0, bit use_forced = 0);
    logic [31:0] exp_y;
    a = ta;
    b = tb_;
    #1;
    exp_y = use_forced ? forced : to_fp(to_real(ta) / to_real(tb_));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h / %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h4040_0000);   // 1 / 3
    check(32'h40C0_0000, 32'h4040_0000);   // 6 / 3
    check(32'hBF80_0000, 32'h3F00_0000);   // -1 / 0.5
    check(32'h0000_0000, 32'h4040_0000, 32'h0000_0000, 1);
    check(32'h3F80_0000, 32'h0000_0000, 32'h7F80_0000, 1);
    for (int i = 0; i < 4000; i++)
      check(rand_fp(80, 170), rand_fp(80, 170));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
