// fp_mul: IEEE-754 single-precision multiplier (combinational).
//
// Z = A * B. The sign is S_A xor S_B; the exponent is E_A + E_B - 127; the
// 24x24-bit product of the significands 1.M_A * 1.M_B is 48 bits wide and
// lies in [1,4), so it is normalised by at most one right shift (exponent
// + 1). It is then rounded to 24 significant bits (to nearest, ties to even:
// the mode is this design's choice) and the exponent is checked: above 254
// sets overflow and gives a signed infinity, below 1 sets underflow and
// gives a signed zero. An operand with exponent 0 is zero and gives zero.
// Special operands follow IEEE-754 without flags: NaN or 0 * inf gives the
// quiet NaN, inf times a non-zero number gives a signed infinity.
//
// Timing: purely combinational, no clock.
module fp_mul
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t z,
  output logic  overflow,
  output logic  underflow
);

  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] rnd;
  logic signed [10:0] e_sum;
  logic        s;

  always_comb begin
    s    = a.sign ^ b.sign;
    prod = {24'd0, 1'b1, a.frac} * {24'd0, 1'b1, b.frac};
    e_sum = $signed({3'b000, a.exp}) + $signed({3'b000, b.exp}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e_sum  = e_sum + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    rnd      = {1'b0, mant} + {24'd0, round_up};
    if (rnd[24]) begin
      rnd   = rnd >> 1;
      e_sum = e_sum + 11'sd1;
    end

    overflow  = 1'b0;
    underflow = 1'b0;
    if (fp_is_nan(a) || fp_is_nan(b) ||
        (fp_is_inf(a) && b.exp == 8'd0) || (fp_is_inf(b) && a.exp == 8'd0)) begin
      z = FP_QNAN;                        // NaN operand or 0 * inf
    end else if (fp_is_inf(a) || fp_is_inf(b)) begin
      z = fp_inf(s);
    end else if (a.exp == 8'd0 || b.exp == 8'd0) begin
      z = fp_zero(s);
    end else if (e_sum > 11'sd254) begin
      overflow = 1'b1;
      z        = fp_inf(s);
    end else if (e_sum < 11'sd1) begin
      underflow = 1'b1;
      z         = fp_zero(s);
    end else begin
      z = '{sign: s, exp: e_sum[7:0], frac: rnd[22:0]};
    end
  end

endmodule
