// tb_fpadd: self-checking test of the combinational single precision adder.
// Random operands of both signs, with exponent differences that exercise
// alignment, sticky rounding and massive cancellation, plus directed cases
// (x - x, zero operands, equal exponents, carry-out). Each result must equal
// the double precision sum rounded to single.
module tb_fpadd;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fpadd dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    logic [31:0] exp_y;
    a = ta;
    b = tb_;
    #1;
    exp_y = to_fp(to_real(ta) + to_real(tb_));
    if (exp_y == 32'h8000_0000) exp_y = 32'h0;  // exact zero sum is +0
    if (to_real(ta) == 0.0 && to_real(tb_) == 0.0) exp_y = {ta[31] & tb_[31], 31'd0};
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h = %h, expected %h", ta, tb_, y, exp_y);
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
    logic [31:0] r;
    check(32'h3F80_0000, 32'h3F80_0000);   // 1 + 1
    check(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1
    check(32'h0000_0000, 32'h4049_0FDB);   // 0 + pi
    check(32'hC049_0FDB, 32'h0000_0000);
    check(32'h8000_0000, 32'h8000_0000);   // -0 + -0
    check(32'h3F80_0001, 32'hBF80_0000);   // cancellation to one ulp
    check(32'h4B7F_FFFF, 32'h3F00_0000);   // tie, round to even
    check(32'h4B7F_FFFE, 32'h3F00_0000);
    check(32'h3F7F_FFFF, 32'h3380_0000);   // carry into the exponent
    for (int i = 0; i < 4000; i++) begin
      r = rand_fp(100, 150);
      case (i % 4)
        0: check(r, rand_fp(100, 150));
        1: check(r, {~r[31], r[30:23], 23'($urandom)});                       // same exponent, opposite sign
        2: check(r, {1'($urandom), 8'(int'(r[30:23]) - int'($urandom_range(3))), 23'($urandom)});
        default: check(r, {1'($urandom), 8'(int'(r[30:23]) - 20 - int'($urandom_range(15))), 23'($urandom)});
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
