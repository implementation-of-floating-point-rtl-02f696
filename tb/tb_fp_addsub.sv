// tb_fp_addsub: self-checking test of the single-precision adder/subtractor.
// Directed cases (carry-out normalisation, cancellation, zero operands,
// overflow, underflow, large exponent differences, infinities and NaNs) and
// random operands are compared with a double-precision reference rounded to
// nearest-even.
module tb_fp_addsub;
  import tb_ref_pkg::*;

  logic [31:0] a, b, z;
  logic        sub, ovf, unf;
  int          checks = 0, failures = 0;

  fp_addsub dut (.a(a), .b(b), .sub(sub), .z(z), .overflow(ovf), .underflow(unf));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic ts);
    logic [33:0] exp;
    real ra, rb;
    a = ta; b = tb_; sub = ts;
    #1;
    ra  = fp_to_real(ta);
    rb  = fp_to_real(tb_);
    exp = real_to_fp(ts ? ra - rb : ra + rb);
    if (ra == 0.0 && rb == 0.0) exp[31] = ta[31] & (tb_[31] ^ ts);
    checks++;
    if ({ovf, unf, z} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h: got %h o%b u%b, want %h o%b u%b", ta, ts ? "-" : "+", tb_,
                 z, ovf, unf, exp[31:0], exp[33], exp[32]);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000, 1'b0);   // 1 + 1 = 2 (carry)
    check(32'h3F80_0000, 32'h3F80_0000, 1'b1);   // 1 - 1 = 0
    check(32'h4000_0000, 32'h3F80_0000, 1'b1);   // 2 - 1
    check(32'h4267_8B73, 32'h4187_5E8E, 1'b0);   // 57.886 + 16.921
    check(32'h4267_8B73, 32'h4187_5E8E, 1'b1);
    check(32'h3F80_0000, 32'h3380_0000, 1'b0);   // tie to even
    check(32'h3F80_0001, 32'h3380_0000, 1'b0);   // tie, round up
    check(32'h3F80_0000, 32'h3380_0000, 1'b1);   // borrow across
    check(32'h0000_0000, 32'h4040_0000, 1'b1);   // 0 - 3
    check(32'h4040_0000, 32'h0000_0000, 1'b0);   // 3 + 0
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);   // overflow
    check(32'h0080_0001, 32'h0080_0000, 1'b1);   // underflow
    check(32'h5000_0000, 32'h3000_0000, 1'b1);   // huge exponent gap
    check(32'h7F80_0000, 32'h7F80_0000, 1'b1);   // inf - inf = NaN
    check(32'h7F80_0000, 32'h7F80_0000, 1'b0);   // inf + inf
    check(32'h4040_0000, 32'hFF80_0000, 1'b1);   // 3 - (-inf)
    check(32'h7FC0_1234, 32'h4040_0000, 1'b0);   // NaN + 3
    check(32'h0000_0000, 32'h7F80_0000, 1'b1);   // 0 - inf
    for (int i = 0; i < 20000; i++) begin
      int lo, hi;
      lo = (i % 4 == 0) ? 1 : 100;
      hi = (i % 4 == 0) ? 255 : 140;
      check(rand_fp(lo, hi), rand_fp(lo, hi), 1'($urandom));
    end
    // near-equal operands exercise the left-shift normalisation
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x;
      x = rand_fp(60, 200);
      check(x, x ^ 32'($urandom % 64), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
