// lns_div: LNS divider (combinational).
//
// In the log domain a quotient is a difference: S_Z = S_A xor S_B and
// E_Z = E_A - E_B, a 31-bit fixed-point subtraction. The result is
// range-checked as in lns_mul. Division by the zero code sets overflow and
// returns the largest magnitude; a zero dividend gives zero (this design's
// convention, see lns_pkg).
//
// Timing: purely combinational, one subtractor.
module lns_div
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
    e = 34'($signed(a.lg)) - 34'($signed(b.lg));
    if (lns_is_zero(b)) begin
      z = '{sign: a.sign ^ b.sign, lg: LNS_LOG_MAX}; overflow = 1'b1; underflow = 1'b0;
    end else if (lns_is_zero(a)) begin
      z = '{sign: 1'b0, lg: LNS_LOG_ZERO}; overflow = 1'b0; underflow = 1'b0;
    end else begin
      {overflow, underflow, z} = lns_pack(a.sign ^ b.sign, e);
    end
  end

endmodule
