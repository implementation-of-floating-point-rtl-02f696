// fp_addsub: IEEE-754 single-precision adder/subtractor (combinational).
//
// Z = A + B (sub = 0) or Z = A - B (sub = 1). Following the classic steps:
// split sign, exponent and significand; order the operands so that
// |X| >= |Y|; the result takes X's exponent and sign; shift 1.M_Y right by the
// exponent difference; add or subtract the significands; normalise (one
// place right on a carry, or left by the leading-zero count after a
// cancellation); check the exponent for overflow/underflow; pack.
//
// This design's own choices: the aligned significand keeps guard, round and
// sticky bits and the result is rounded to nearest-even; exponent 0 inputs
// are zero (denormals flushed). Special operands follow IEEE-754: a NaN
// operand or inf - inf gives the quiet NaN, an infinite operand gives that
// infinity, with no flag. Overflow returns a signed infinity, underflow a
// signed zero, exact cancellation +0 with no flag.
//
// Timing: purely combinational, no clock; the result is valid one
// propagation delay after the inputs change.
module fp_addsub
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t z,
  output logic  overflow,
  output logic  underflow
);

  fp32_t       x, y;            // |x| >= |y|
  logic        yb_sign;         // sign of B after the subtract inversion
  logic        a_zero, b_zero;
  logic [7:0]  d;
  logic [26:0] sig_x, sig_y;    // 1.M << 3 : hidden bit, fraction, G, R, S
  logic [26:0] y_al;            // aligned y with sticky in bit 0
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [26:0] norm;
  logic signed [9:0] e_norm;
  logic [24:0] rnd;             // rounded significand with carry-out bit
  logic signed [9:0] e_fin;
  logic        eff_sub;
  logic        round_up;

  always_comb begin
    yb_sign = b.sign ^ sub;
    a_zero  = (a.exp == 8'd0);
    b_zero  = (b.exp == 8'd0);

    // step 2: order by magnitude
    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      x = a;
      y = '{sign: yb_sign, exp: b.exp, frac: b.frac};
    end else begin
      x = '{sign: yb_sign, exp: b.exp, frac: b.frac};
      y = a;
    end
    eff_sub = x.sign ^ y.sign;

    // step 4: align
    d     = x.exp - y.exp;
    sig_x = {1'b1, x.frac, 3'b000};
    sig_y = {1'b1, y.frac, 3'b000};
    if (d > 8'd26) begin
      y_al = 27'd1;                       // only the sticky bit survives
    end else begin
      y_al = sig_y >> d;
      if ((sig_y & ((27'd1 << d) - 27'd1)) != 27'd0) y_al[0] = 1'b1;
    end

    // step 5: significand add / subtract
    sum = eff_sub ? ({1'b0, sig_x} - {1'b0, y_al}) : ({1'b0, sig_x} + {1'b0, y_al});

    // step 6: normalise
    lz = 5'd0;
    for (int i = 0; i <= 26; i++) begin
      if (sum[i]) lz = 5'(26 - i);
    end
    if (sum[27]) begin
      norm   = {sum[27:2], sum[1] | sum[0]};
      e_norm = $signed({2'b00, x.exp}) + 10'sd1;
    end else begin
      norm   = sum[26:0] << lz;
      e_norm = $signed({2'b00, x.exp}) - $signed({5'd0, lz});
    end

    // round to nearest, ties to even
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    rnd      = {1'b0, norm[26:3]} + {24'd0, round_up};
    e_fin    = e_norm;
    if (rnd[24]) begin
      rnd   = rnd >> 1;
      e_fin = e_norm + 10'sd1;
    end

    // step 7/8: range check and pack
    overflow  = 1'b0;
    underflow = 1'b0;
    if (fp_is_nan(a) || fp_is_nan(b) || (fp_is_inf(a) && fp_is_inf(b) && a.sign != yb_sign)) begin
      z = FP_QNAN;                        // NaN operand or inf - inf
    end else if (fp_is_inf(a)) begin
      z = a;
    end else if (fp_is_inf(b)) begin
      z = fp_inf(yb_sign);
    end else if (a_zero && b_zero) begin
      z = fp_zero(a.sign & yb_sign);
    end else if (a_zero) begin
      z = '{sign: yb_sign, exp: b.exp, frac: b.frac};
    end else if (b_zero) begin
      z = a;
    end else if (sum == 28'd0) begin
      z = fp_zero(1'b0);
    end else if (e_fin > 10'sd254) begin
      overflow = 1'b1;
      z        = fp_inf(x.sign);
    end else if (e_fin < 10'sd1) begin
      underflow = 1'b1;
      z         = fp_zero(x.sign);
    end else begin
      z = '{sign: x.sign, exp: e_fin[7:0], frac: rnd[22:0]};
    end
  end

endmodule
