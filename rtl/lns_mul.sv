// lns_mul: LNS multiplier (combinational).
//
// In the log domain a product is a sum: S_Z = S_A xor S_B and
// E_Z = E_A + E_B, a 31-bit fixed-point addition. The sum is range-checked:
// above the largest log it saturates and sets overflow; at or below -128.0
// it becomes the zero code and sets underflow. A zero-code operand gives
// zero (this design's convention, see lns_pkg).
//
// Timing: purely combinational, one adder.
module lns_mul
  import lns_pkg::*;
(
  input  lns32_t a,
  input  lns32_t b,
  output lns32_t z,
  output logic   overflow,
  output logic   underflow
);

  logic signed [33:0] e;

  always_comb begin
    e = 34'($signed(a.lg)) + 34'($signed(b.lg));
    if (lns_is_zero(a) || lns_is_zero(b)) begin
      z = '{sign: 1'b0, lg: LNS_LOG_ZERO}; overflow = 1'b0; underflow = 1'b0;
    end else begin
      {overflow, underflow, z} = lns_pack(a.sign ^ b.sign, e);
    end
  end

endmodule
