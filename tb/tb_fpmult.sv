// tb_fpmult: self-checking test of the combinational single precision
// multiplier against the double precision product rounded to single, over
// random operands, zeros and exact ties.
module tb_fpmult;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fpmult dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    logic [31:0] exp_y;
    a = ta;
    b = tb_;
    #1;
    exp_y = to_fp(to_real(ta) * to_real(tb_));
    if (ta[30:23] == 0 || tb_[30:23] == 0) exp_y = {ta[31] ^ tb_[31], 31'd0};
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h = %h, expected %h", ta, tb_, y, exp_y);
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
    check(32'h4000_0000, 32'h4049_0FDB);   // 2 * pi
    check(32'hBF80_0000, 32'h3F00_0000);   // -1 * 0.5
    check(32'h0000_0000, 32'hC049_0FDB);   // 0 * -pi
    check(32'h3F80_0001, 32'h3F80_0001);
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // product near 4
    for (int i = 0; i < 4000; i++)
      check(rand_fp(80, 170), rand_fp(80, 170));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
