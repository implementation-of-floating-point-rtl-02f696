// lns_pow2_neg: m = 2^-d by products of ROM constants (combinational).
//
// d is an unsigned Q8.23 number with integer part I and fraction F. Since
// -(I + F) = (1 - F) - (I + 1), m = 2^(1-F) / 2^(I+1). The power 2^(1-F),
// with G = 1 - F in (0,1), is the product of rom1[j] = 2^(2^-j) over the set
// bits of G (bit weight 2^-j, j = 1..23), starting from 1; the division by
// 2^(I+1) is a right shift. When F = 0 the product is 1 and the shift is I.
// rom1 holds 23 words in unsigned Q1.FW, computed at elaboration. Products
// are truncated to FW fraction bits after each multiply. The register width
// FW is this design's choice.
//
// Output m is unsigned Q1.FW, 0 <= m <= 1 (m = 0 once the shift exceeds FW).
// Timing: combinational; a chain of 23 multipliers.
module lns_pow2_neg #(
  parameter int FW = 56
) (
  input  logic [30:0] d,
  output logic [FW:0] m
);

  typedef logic [FW:0] rom_t [1:23];

  function automatic rom_t gen_rom1();
    rom_t r;
    for (int j = 1; j <= 23; j++)
      r[j] = (FW+1)'(longint'($pow(2.0, $pow(2.0, -real'(j))) * $pow(2.0, real'(FW))));
    return r;
  endfunction

  localparam rom_t ROM1 = gen_rom1();

  logic [7:0]        int_part;
  logic [22:0]       frac;
  logic [23:0]       g;              // 1 - F, Q1.23
  logic [2*FW+1:0]   prod;
  logic [FW:0]       rega;
  logic [8:0]        shift;

  always_comb begin
    int_part = d[30:23];
    frac     = d[22:0];
    g        = 24'h80_0000 - {1'b0, frac};
    rega     = (FW+1)'(1) << FW;
    for (int j = 1; j <= 23; j++) begin
      prod = (2*FW+2)'(rega) * (2*FW+2)'(ROM1[j]);
      if (g[23-j]) rega = prod[2*FW:FW];
    end
    shift = (frac == 23'd0) ? {1'b0, int_part} : {1'b0, int_part} + 9'd1;
    m     = (shift > 9'(FW)) ? '0 : rega >> shift;
  end

endmodule
