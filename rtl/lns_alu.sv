// lns_alu: LNS arithmetic unit (combinational).
//
// Performs add, subtract, multiply or divide on two LNS words (see lns_pkg).
// Multiplication and division are single fixed-point adders (lns_mul,
// lns_div). Addition and subtraction of magnitudes need the Gaussian
// logarithms log2(1 +/- 2^-d), for which two implementations are built side
// by side and chosen by 'alg':
//   alg = 0  algorithm 1, ROM + second-order interpolation
//            (lns_add_alg1, lns_sub_alg1)
//   alg = 1  algorithm 2, multiplicative normalisation with two 23-word
//            constant ROMs (lns_add_alg2, lns_sub_alg2)
// The adder units only handle operands of equal sign and the subtractor
// units compute A - B for operands of equal sign. This unit routes signed
// operands to them (this design's addition): with B' = B for add and B with
// its sign inverted for subtract, A + B' goes to the adder when the signs of
// A and B' agree, and otherwise A - (-B') goes to the subtractor.
// Operation codes: 0 add, 1 sub, 2 mul, 3 div (fp_pkg::arith_op_e).
//
// Timing: purely combinational.
module lns_alu
  import lns_pkg::*;
  import fp_pkg::arith_op_e, fp_pkg::OP_ADD, fp_pkg::OP_SUB, fp_pkg::OP_MUL, fp_pkg::OP_DIV;
#(
  parameter int ADD_STEP_LOG2 = 3,   // 184-word addition ROM
  parameter int SUB_STEP_LOG2 = 3,   // 184-word coarse subtraction ROM
  parameter int SUB_FINE      = 5,   // fine table for d <= 0.5 (432-word size)
  parameter int FW            = 56   // algorithm-2 internal fraction width
) (
  input  lns32_t    a,
  input  lns32_t    b,
  input  arith_op_e op,
  input  logic      alg,
  output lns32_t    z,
  output logic      overflow,
  output logic      underflow
);

  lns32_t b_eff;        // B with the sign seen by an addition
  lns32_t b_sub;        // operand for the subtractor: -B_eff
  logic   use_sub;

  lns32_t z_add1, z_sub1, z_add2, z_sub2, z_mul, z_div;
  logic   o_add1, u_add1, o_sub1, u_sub1, o_add2, u_add2, o_sub2, u_sub2;
  logic   o_mul, u_mul, o_div, u_div;

  always_comb begin
    b_eff   = '{sign: b.sign ^ (op == OP_SUB), lg: b.lg};
    b_sub   = '{sign: ~b_eff.sign, lg: b.lg};
    use_sub = a.sign ^ b_eff.sign;
  end

  lns_add_alg1 #(.STEP_LOG2(ADD_STEP_LOG2)) i_add1 (.a(a), .b(b_eff), .z(z_add1), .overflow(o_add1), .underflow(u_add1));
  lns_sub_alg1 #(.STEP_LOG2(SUB_STEP_LOG2), .FINE_LEVELS(SUB_FINE))
                                            i_sub1 (.a(a), .b(b_sub), .z(z_sub1), .overflow(o_sub1), .underflow(u_sub1));
  lns_add_alg2 #(.FW(FW))                   i_add2 (.a(a), .b(b_eff), .z(z_add2), .overflow(o_add2), .underflow(u_add2));
  lns_sub_alg2 #(.FW(FW))                   i_sub2 (.a(a), .b(b_sub), .z(z_sub2), .overflow(o_sub2), .underflow(u_sub2));
  lns_mul                                   i_mul  (.a(a), .b(b), .z(z_mul), .overflow(o_mul), .underflow(u_mul));
  lns_div                                   i_div  (.a(a), .b(b), .z(z_div), .overflow(o_div), .underflow(u_div));

  always_comb begin
    unique case (op)
      OP_MUL: begin z = z_mul; overflow = o_mul; underflow = u_mul; end
      OP_DIV: begin z = z_div; overflow = o_div; underflow = u_div; end
      default: begin
        unique case ({alg, use_sub})
          2'b00:   begin z = z_add1; overflow = o_add1; underflow = u_add1; end
          2'b01:   begin z = z_sub1; overflow = o_sub1; underflow = u_sub1; end
          2'b10:   begin z = z_add2; overflow = o_add2; underflow = u_add2; end
          default: begin z = z_sub2; overflow = o_sub2; underflow = u_sub2; end
        endcase
      end
    endcase
  end

endmodule
