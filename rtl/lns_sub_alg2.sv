// lns_sub_alg2: LNS subtractor, multiplicative-normalisation algorithm
// (combinational).
//
// Same job as lns_sub_alg1 (Z = A - B for operands of equal sign, via
// E_Z = E_X + log2(1 - 2^-d)) without a function table. m = 2^-d comes from
// lns_pow2_neg. Since 1 - m lies in (0, 1), it is first shifted left by p
// places into [1, 2) (p = its leading-zero count, this design's addition),
// log2 of that is extracted bit by bit (lns_log2_bitwise), and
// log2(1 - m) = that - p. d = 0 gives the zero code; when m is below the
// internal resolution the correction is 0. Sign rule, range check, zero
// handling and flags are as in lns_sub_alg1. FW is the internal fraction
// width (this design's choice); it bounds the accuracy for very small d.
//
// Timing: purely combinational, a long multiplier chain.
module lns_sub_alg2
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
  logic [FW:0]        one_m;       // 1 - m, Q1.FW
  logic [FW+1:0]      y;
  logic [23:0]        lg;
  logic [7:0]         p;
  logic signed [33:0] e;
  logic               a_ge_b, s;

  lns_pow2_neg     #(.FW(FW)) i_pow (.d(diff), .m(m));
  lns_log2_bitwise #(.FW(FW)) i_log (.y(y), .lg(lg));

  always_comb begin
    a_ge_b = $signed(a.lg) >= $signed(b.lg);
    big    = a_ge_b ? a : b;
    s      = a_ge_b ? a.sign : ~a.sign;
    diff   = a_ge_b ? 31'($signed(a.lg) - $signed(b.lg)) : 31'($signed(b.lg) - $signed(a.lg));
    one_m  = ((FW+1)'(1) << FW) - m;
    p      = '0;
    for (int i = 0; i <= FW; i++) begin
      if (one_m[i]) p = 8'(FW - i);
    end
    y = (FW+2)'(one_m << p);
    e = 34'($signed(big.lg)) + $signed({10'd0, lg}) - $signed({3'd0, p, 23'd0});

    overflow  = 1'b0;
    underflow = 1'b0;
    if (lns_is_zero(b)) begin
      z = a;
    end else if (lns_is_zero(a)) begin
      z = '{sign: ~b.sign, lg: b.lg};
    end else if (diff == 31'd0 || one_m == '0) begin
      z = '{sign: 1'b0, lg: LNS_LOG_ZERO};
    end else begin
      {overflow, underflow, z} = lns_pack(s, e);
    end
  end

endmodule
