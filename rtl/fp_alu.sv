// fp_alu: floating-point arithmetic unit (combinational).
//
// Performs one of the four operations on IEEE-754 single-precision operands
// A and B and delivers Z with overflow and underflow flags. Addition and
// subtraction share one adder/subtractor (fp_addsub); multiplication
// (fp_mul) and division (fp_div) have their own units. All three compute in
// parallel and 'op' selects the result (0 add, 1 sub, 2 mul, 3 div; the
// encoding is this design's choice).
//
// Timing: purely combinational, no clock.
module fp_alu
  import fp_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  input  arith_op_e op,
  output fp32_t     z,
  output logic      overflow,
  output logic      underflow
);

  fp32_t z_as, z_mul, z_div;
  logic  o_as, u_as, o_mul, u_mul, o_div, u_div;

  fp_addsub i_addsub (.a(a), .b(b), .sub(op == OP_SUB), .z(z_as), .overflow(o_as), .underflow(u_as));
  fp_mul    i_mul    (.a(a), .b(b), .z(z_mul), .overflow(o_mul), .underflow(u_mul));
  fp_div    i_div    (.a(a), .b(b), .z(z_div), .overflow(o_div), .underflow(u_div));

  always_comb begin
    unique case (op)
      OP_MUL:  begin z = z_mul; overflow = o_mul; underflow = u_mul; end
      OP_DIV:  begin z = z_div; overflow = o_div; underflow = u_div; end
      default: begin z = z_as;  overflow = o_as;  underflow = u_as;  end
    endcase
  end

endmodule
