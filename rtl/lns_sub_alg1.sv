// lns_sub_alg1: LNS subtractor, table-lookup algorithm (combinational).
//
// For operands of equal sign, |X| - |Y| with |X| >= |Y| is computed in the
// log domain as E_Z = E_X + log2(1 - 2^-d), d = E_X - E_Y. The operands are
// swapped so that X is the larger; the result has A's sign when |A| >= |B|
// and the opposite sign otherwise, so Z = A - B. d = 0 gives the zero code.
//
// The function has a pole at d = 0 and its higher derivatives grow like
// 1/d^3 there, so the ROM is in two parts. A coarse table of 23*2^STEP_LOG2
// samples (184 by default) covers 0 < d <= 23 uniformly. For d <= 0.5 a
// fine table is used instead: with FINE_LEVELS = L >= 1 it holds 2^(L+2)
// samples at k*2^-(L+3), k = 1..2^(L+2), i.e. each extra level doubles the
// sample density over the whole of 0 < d <= 0.5 and leaves the coarse
// table unchanged. Counting the tables of every smaller configuration as
// kept, the ROM sizes of L = 0..5 are 184, 192, 208, 240, 304 and 432
// words; only the finest table is ever read, so this design stores just
// that one (184 + 128 = 312 words for L = 5). No table holds the pole
// itself. Each table is read with second-order
// interpolation (lns_interp). For d >= 23 the correction is below one LSB
// and E_Z = E_X. Overflow saturates, underflow returns the zero code; a
// zero-code operand returns the other operand (negated for B).
//
// Timing: purely combinational.
module lns_sub_alg1
  import lns_pkg::*;
#(
  parameter int STEP_LOG2   = 3,
  parameter int FINE_LEVELS = 5
) (
  input  lns32_t a,
  input  lns32_t b,
  output lns32_t z,
  output logic   overflow,
  output logic   underflow
);

  localparam int NSAMP = 23 * (1 << STEP_LOG2);

  lns32_t             big;
  logic [30:0]        diff;
  logic signed [33:0] f, e;
  logic signed [33:0] f_coarse, f_fine;
  logic               a_ge_b, s;

  lns_interp #(.FUNC(1'b1), .STEP_LOG2(STEP_LOG2), .NSAMP(NSAMP), .OFFSET(1)) i_coarse (.d(diff), .f(f_coarse));

  if (FINE_LEVELS > 0) begin : g_fine
    lns_interp #(.FUNC(1'b1), .STEP_LOG2(FINE_LEVELS + 3), .NSAMP(1 << (FINE_LEVELS + 2)), .OFFSET(1))
      i_fine (.d(diff), .f(f_fine));
  end else begin : g_no_fine
    assign f_fine = f_coarse;
  end

  always_comb begin
    a_ge_b = $signed(a.lg) >= $signed(b.lg);
    big    = a_ge_b ? a : b;
    s      = a_ge_b ? a.sign : ~a.sign;
    diff   = a_ge_b ? 31'($signed(a.lg) - $signed(b.lg)) : 31'($signed(b.lg) - $signed(a.lg));

    f = (diff <= 31'h0040_0000) ? f_fine : f_coarse;     // d <= 0.5
    if (diff >= 31'(NSAMP << (23 - STEP_LOG2))) f = 34'sd0;
    e = 34'($signed(big.lg)) + f;

    overflow  = 1'b0;
    underflow = 1'b0;
    if (lns_is_zero(b)) begin
      z = a;
    end else if (lns_is_zero(a)) begin
      z = '{sign: ~b.sign, lg: b.lg};
    end else if (diff == 31'd0) begin
      z = '{sign: 1'b0, lg: LNS_LOG_ZERO};
    end else begin
      {overflow, underflow, z} = lns_pack(s, e);
    end
  end

endmodule
