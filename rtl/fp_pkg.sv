// fp_pkg: shared types and constants for the IEEE-754 single-precision units.
// A word is one sign bit, an 8-bit exponent biased by 127 and a 23-bit
// fraction with a hidden leading one. Exponent 0 is treated as zero
// (denormals are flushed). Exponent 255 is infinity (fraction 0) or NaN
// (fraction non-zero); every NaN result is the quiet NaN 0x7FC00000. The
// operation codes are shared by the FP and LNS units.
package fp_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_DIV = 2'd3
  } arith_op_e;

  function automatic fp32_t fp_inf(input logic s);
    return '{sign: s, exp: 8'hFF, frac: '0};
  endfunction

  localparam fp32_t FP_QNAN = '{sign: 1'b0, exp: 8'hFF, frac: 23'h40_0000};

  function automatic logic fp_is_nan(input fp32_t v);
    return v.exp == 8'hFF && v.frac != 23'd0;
  endfunction

  function automatic logic fp_is_inf(input fp32_t v);
    return v.exp == 8'hFF && v.frac == 23'd0;
  endfunction

  function automatic fp32_t fp_zero(input logic s);
    return '{sign: s, exp: 8'h00, frac: '0};
  endfunction

endpackage
