// lns_add_alg1: LNS adder, table-lookup algorithm (combinational).
//
// For operands of equal sign, |Z| = |X| + |Y| with |X| >= |Y| is computed in
// the log domain as E_Z = E_X + log2(1 + 2^-d), d = E_X - E_Y >= 0. The
// operands are swapped so that X is the larger, the result takes X's sign,
// and log2(1 + 2^-d) comes from a ROM of 23*2^STEP_LOG2 uniformly spaced
// samples over 0 <= d < 23 with second-order interpolation (lns_interp).
// With the default STEP_LOG2 = 3 the ROM holds 184 words; STEP_LOG2 = 2
// gives the 92-word variant. For d >= 23 the correction is below one LSB
// and E_Z = E_X. The sum is then range-checked: overflow saturates the log
// part, underflow returns the zero code (see lns_pkg). A zero-code operand
// returns the other operand. Operands of opposite sign are outside this
// unit's job (lns_alu routes them to the subtractor); if given, the result
// still carries the sign of the larger operand.
//
// Timing: purely combinational.
module lns_add_alg1
  import lns_pkg::*;
#(
  parameter int STEP_LOG2 = 3
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
  logic signed [33:0] f, f_rom, e;
  logic               a_ge_b;

  lns_interp #(.FUNC(1'b0), .STEP_LOG2(STEP_LOG2), .NSAMP(NSAMP)) i_rom (.d(diff), .f(f_rom));

  always_comb begin
    a_ge_b = $signed(a.lg) >= $signed(b.lg);
    big    = a_ge_b ? a : b;
    diff   = a_ge_b ? 31'($signed(a.lg) - $signed(b.lg)) : 31'($signed(b.lg) - $signed(a.lg));
    f      = (diff >= 31'(NSAMP << (23 - STEP_LOG2))) ? 34'sd0 : f_rom;
    e      = 34'($signed(big.lg)) + f;
    if (lns_is_zero(a)) begin
      z = b; overflow = 1'b0; underflow = 1'b0;
    end else if (lns_is_zero(b)) begin
      z = a; overflow = 1'b0; underflow = 1'b0;
    end else begin
      {overflow, underflow, z} = lns_pack(big.sign, e);
    end
  end

endmodule
