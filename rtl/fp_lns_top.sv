// fp_lns_top: floating-point and logarithmic arithmetic units side by side.
//
// The design compares two ways of representing real numbers in 32 bits:
// IEEE-754 single precision (fp_alu) and a logarithmic number system with an
// 8.23-bit fixed-point log (lns_alu). Each unit takes two operands and an
// operation code (0 add, 1 sub, 2 mul, 3 div) and returns a result with
// overflow and underflow flags; the LNS unit also selects its add/subtract
// algorithm with lns_alg (0: ROM + interpolation, 1: multiplicative
// normalisation). The units share nothing and have their own ports.
//
// Timing: purely combinational, no clock or reset.
module fp_lns_top
  import fp_pkg::*;
  import lns_pkg::*;
(
  input  fp32_t     fp_a,
  input  fp32_t     fp_b,
  input  arith_op_e fp_op,
  output fp32_t     fp_z,
  output logic      fp_overflow,
  output logic      fp_underflow,

  input  lns32_t    lns_a,
  input  lns32_t    lns_b,
  input  arith_op_e lns_op,
  input  logic      lns_alg,
  output lns32_t    lns_z,
  output logic      lns_overflow,
  output logic      lns_underflow
);

  fp_alu  i_fp  (.a(fp_a), .b(fp_b), .op(fp_op), .z(fp_z),
                 .overflow(fp_overflow), .underflow(fp_underflow));

  lns_alu i_lns (.a(lns_a), .b(lns_b), .op(lns_op), .alg(lns_alg), .z(lns_z),
                 .overflow(lns_overflow), .underflow(lns_underflow));

endmodule
