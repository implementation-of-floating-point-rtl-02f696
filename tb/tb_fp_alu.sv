// tb_fp_alu: self-checking test of the floating-point arithmetic unit. Every
// operation code is exercised with random operands and compared with a
// double-precision reference rounded to nearest-even, so a wrong result
// select or a wrong operation shows as a mismatch.
module tb_fp_alu;
  import tb_ref_pkg::*;
  import fp_pkg::*;

  logic [31:0] a, b, z;
  arith_op_e   op;
  logic        ovf, unf;
  int          checks = 0, failures = 0;
  int          per_op [4];

  fp_alu dut (.a(a), .b(b), .op(op), .z(z), .overflow(ovf), .underflow(unf));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input arith_op_e top);
    real ra, rb, r;
    logic [33:0] want;
    a = ta; b = tb_; op = top;
    #1;
    ra = fp_to_real(ta);
    rb = fp_to_real(tb_);
    case (top)
      OP_ADD:  r = ra + rb;
      OP_SUB:  r = ra - rb;
      OP_MUL:  r = ra * rb;
      default: r = ra / rb;
    endcase
    want = real_to_fp(r);
    if (top == OP_MUL && (ra == 0.0 || rb == 0.0)) want = {2'b00, ta[31] ^ tb_[31], 31'd0};
    if (top == OP_DIV && rb == 0.0) want = {2'b10, ta[31] ^ tb_[31], 8'hFF, 23'd0};
    checks++;
    per_op[int'(top)]++;
    if ({ovf, unf, z} !== want) begin
      failures++;
      if (failures < 10) $display("FAIL op %0d %h %h: got %h o%b u%b want %h", top, ta, tb_, z, ovf, unf, want);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h4267_8B73, 32'h4187_5E8E, OP_ADD);   // 57.886 + 16.921
    check(32'h4267_8B73, 32'h4187_5E8E, OP_SUB);
    check(32'h4267_8B73, 32'h4187_5E8E, OP_MUL);
    check(32'h4267_8B73, 32'h4187_5E8E, OP_DIV);
    check(32'h7F00_0000, 32'h7F00_0000, OP_MUL);   // overflow
    check(32'h3F80_0000, 32'h0000_0000, OP_DIV);   // divide by zero
    for (int i = 0; i < 20000; i++)
      check(rand_fp(1, 254), rand_fp(1, 254), arith_op_e'(i % 4));
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (per_op[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
