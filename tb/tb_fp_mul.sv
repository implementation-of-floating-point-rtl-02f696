// tb_fp_mul: self-checking test of the single-precision multiplier. Directed
// cases (normalisation carry, rounding, zero, overflow, underflow, inf, NaN)
// and random
// operands are compared with the exact double-precision product rounded to
// nearest-even.
module tb_fp_mul;
  import tb_ref_pkg::*;

  logic [31:0] a, b, z;
  logic        ovf, unf;
  int          checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .z(z), .overflow(ovf), .underflow(unf));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [33:0] exp;
    a = ta; b = tb_;
    #1;
    exp = real_to_fp(fp_to_real(ta) * fp_to_real(tb_));
    // IEEE special cases: NaN, 0 * inf, inf * x, 0 * x
    if (is_nan(ta) || is_nan(tb_) || (is_inf(ta) && is_zero(tb_)) || (is_inf(tb_) && is_zero(ta)))
      exp = {2'b00, 32'h7FC0_0000};
    else if (is_inf(ta) || is_inf(tb_)) exp = {2'b00, ta[31] ^ tb_[31], 8'hFF, 23'd0};
    else if (is_zero(ta) || is_zero(tb_)) exp = {2'b00, ta[31] ^ tb_[31], 31'd0};
    checks++;
    if ({ovf, unf, z} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h: got %h o%b u%b, want %h o%b u%b", ta, tb_, z, ovf, unf,
                 exp[31:0], exp[33], exp[32]);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3FC0_0000, 32'h3FC0_0000);   // 1.5 * 1.5 = 2.25 (carry)
    check(32'h4267_8B73, 32'h4187_5E8E);   // 57.886 * 16.921
    check(32'hC000_0000, 32'h4040_0000);   // -2 * 3
    check(32'h0000_0000, 32'h4040_0000);   // 0 * 3
    check(32'h7F00_0000, 32'h4100_0000);   // overflow
    check(32'h0100_0000, 32'h0100_0000);   // underflow
    check(32'h3F80_0001, 32'h3F80_0001);   // rounding
    check(32'h7F80_0000, 32'h0000_0000);   // inf * 0 = NaN
    check(32'hFF80_0000, 32'h4040_0000);   // -inf * 3
    check(32'h4040_0000, 32'h7FC0_0001);   // 3 * NaN
    for (int i = 0; i < 20000; i++) begin
      if (i % 3 == 0) check(rand_fp(0, 255), rand_fp(0, 255));
      else            check(rand_fp(100, 154), rand_fp(100, 154));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
