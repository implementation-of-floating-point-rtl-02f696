// lns_log2_bitwise: log2 by multiplicative normalisation (combinational).
//
// For y in [1, 4) (unsigned Q2.FW) this produces lg = log2(y) as unsigned
// Q1.23, one bit per step. If y >= 2 the integer bit is set and y is
// halved. Then for j = 1..23: if y >= rom1[j] = 2^(2^-j), bit 2^-j of the
// result is set and y is multiplied by rom2[j] = 2^(-2^-j), which removes
// that amount from its logarithm. The result is truncated (the remainder
// y < 2^(2^-23) is dropped). Both 23-word ROMs are unsigned Q1.FW and are
// computed at elaboration; FW is this design's choice.
//
// Timing: combinational; a chain of 23 compare/multiply stages.
module lns_log2_bitwise #(
  parameter int FW = 56
) (
  input  logic [FW+1:0] y,
  output logic [23:0]   lg
);

  typedef logic [FW:0] rom_t [1:23];

  function automatic rom_t gen_rom(input real sgn);
    rom_t r;
    for (int j = 1; j <= 23; j++)
      r[j] = (FW+1)'(longint'($pow(2.0, sgn * $pow(2.0, -real'(j))) * $pow(2.0, real'(FW))));
    return r;
  endfunction

  localparam rom_t ROM1 = gen_rom(1.0);    // 2^( 2^-j)
  localparam rom_t ROM2 = gen_rom(-1.0);   // 2^(-2^-j)

  logic [FW:0]     rega;
  logic [2*FW+1:0] prod;

  always_comb begin
    lg = '0;
    if (y[FW+1]) begin
      lg[23] = 1'b1;
      rega   = y[FW+1:1];
    end else begin
      rega   = y[FW:0];
    end
    for (int j = 1; j <= 23; j++) begin
      prod = (2*FW+2)'(rega) * (2*FW+2)'(ROM2[j]);
      if (rega >= ROM1[j]) begin
        lg[23-j] = 1'b1;
        rega     = prod[2*FW:FW];
      end
    end
  end

endmodule
