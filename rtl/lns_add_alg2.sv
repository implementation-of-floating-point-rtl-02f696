// lns_add_alg2: LNS adder, multiplicative-normalisation algorithm
// (combinational).
//
// Same job as lns_add_alg1 (E_Z = E_X + log2(1 + 2^-d) for operands of
// equal sign, |X| >= |Y|, result sign of X) but without a function table:
// m = 2^-d is built as a product of the constants 2^(2^-j) selected by the
// bits of the fraction (lns_pow2_neg), and log2(1 + m) is then extracted one
// bit at a time by comparing with 2^(2^-j) and multiplying by 2^(-2^-j)
// (lns_log2_bitwise). The two 23-word constant ROMs do not grow with the
// wanted accuracy, but the datapath is a chain of 46 multipliers. FW sets
// the fraction width of the internal fixed-point values (this design's
// choice). Range check, zero handling and flags are as in lns_add_alg1.
//
// Timing: purely combinational, a long multiplier chain.
module lns_add_alg2
  import lns_pkg::*;
#(
  parameter int FW = 56
) (
  input  lns32_t a,
  input  lns32_t b,
  output lns32_t z,
  output logic   overflow,
  output logic   underflow
);

  lns32_t             big;
  logic [30:0]        diff;
  logic [FW:0]        m;
  logic [FW+1:0]      y;
  logic [23:0]        lg;
  logic signed [33:0] e;
  logic               a_ge_b;

  lns_pow2_neg     #(.FW(FW)) i_pow (.d(diff), .m(m));
  lns_log2_bitwise #(.FW(FW)) i_log (.y(y), .lg(lg));

  always_comb begin
    a_ge_b = $signed(a.lg) >= $signed(b.lg);
    big    = a_ge_b ? a : b;
    diff   = a_ge_b ? 31'($signed(a.lg) - $signed(b.lg)) : 31'($signed(b.lg) - $signed(a.lg));
    y      = ((FW+2)'(1) << FW) + (FW+2)'(m);
    e      = 34'($signed(big.lg)) + $signed({10'd0, lg});
    if (lns_is_zero(a)) begin
      z = b; overflow = 1'b0; underflow = 1'b0;
    end else if (lns_is_zero(b)) begin
      z = a; overflow = 1'b0; underflow = 1'b0;
    end else begin
      {overflow, underflow, z} = lns_pack(big.sign, e);
    end
  end

endmodule
