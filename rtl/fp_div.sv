// fp_div: IEEE-754 single-precision divider (combinational).
//
// Z = A / B. The sign is S_A xor S_B and the exponent E_A - E_B + 127. The
// significands are divided by a restoring shift-and-subtract divider that
// produces 26 quotient bits of 1.M_A / 1.M_B (a value in (0.5, 2)) plus a
// sticky bit from the remainder. A quotient below 1 is normalised by one
// left shift (exponent - 1). The result is rounded to 24 significant bits,
// to nearest with ties to even, and the exponent is checked: above 254 sets
// overflow (signed infinity), below 1 sets underflow (signed zero).
// Division by zero sets overflow and returns a signed infinity; a zero
// dividend gives a signed zero. Other special operands follow IEEE-754
// without flags: NaN, inf/inf or 0/0 gives the quiet NaN, inf/x a signed
// infinity and x/inf a signed zero. The divider structure, the rounding mode
// and the zero handling are this design's choices.
//
// Timing: purely combinational, no clock; the critical path is the chain of
// 26 subtract-and-select stages.
module fp_div
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t z,
  output logic  overflow,
  output logic  underflow
);

  logic [25:0] rem;         // partial remainder (needs 25 bits + 1)
  logic [23:0] dvsr;
  logic [25:0] q;           // quotient bits, weight 2^0 .. 2^-25
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] rnd;
  logic signed [10:0] e_q;
  logic        s;

  always_comb begin
    s    = a.sign ^ b.sign;
    dvsr = {1'b1, b.frac};
    rem  = {2'b00, 1'b1, a.frac};
    for (int i = 25; i >= 0; i--) begin
      if (rem >= {2'b00, dvsr}) begin
        q[i] = 1'b1;
        rem  = rem - {2'b00, dvsr};
      end else begin
        q[i] = 1'b0;
      end
      rem = rem << 1;
    end
    e_q = $signed({3'b000, a.exp}) - $signed({3'b000, b.exp}) + 11'sd127;
    if (q[25]) begin
      mant   = q[25:2];
      guard  = q[1];
      sticky = q[0] | (rem != 26'd0);
    end else begin
      mant   = q[24:1];
      guard  = q[0];
      sticky = (rem != 26'd0);
      e_q    = e_q - 11'sd1;
    end
    round_up = guard & (sticky | mant[0]);
    rnd      = {1'b0, mant} + {24'd0, round_up};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e_q = e_q + 11'sd1;
    end

    overflow  = 1'b0;
    underflow = 1'b0;
    if (fp_is_nan(a) || fp_is_nan(b) || (fp_is_inf(a) && fp_is_inf(b)) ||
        (a.exp == 8'd0 && b.exp == 8'd0)) begin
      z = FP_QNAN;                        // NaN operand, inf / inf or 0 / 0
    end else if (fp_is_inf(a)) begin
      z = fp_inf(s);
    end else if (fp_is_inf(b)) begin
      z = fp_zero(s);
    end else if (b.exp == 8'd0) begin
      overflow = 1'b1;
      z        = fp_inf(s);
    end else if (a.exp == 8'd0) begin
      z = fp_zero(s);
    end else if (e_q > 11'sd254) begin
      overflow = 1'b1;
      z        = fp_inf(s);
    end else if (e_q < 11'sd1) begin
      underflow = 1'b1;
      z         = fp_zero(s);
    end else begin
      z = '{sign: s, exp: e_q[7:0], frac: rnd[22:0]};
    end
  end

endmodule
