// lns_interp: function ROM with second-order interpolation for LNS
// addition/subtraction (combinational).
//
// The ROM holds NSAMP samples of one of the two Gaussian-logarithm
// functions, f(d) = log2(1 + 2^-d) (FUNC = 0, addition) or
// f(d) = log2(1 - 2^-d) (FUNC = 1, subtraction), at d = (k + OFFSET)*h for
// k = 0..NSAMP-1 with h = 2^-STEP_LOG2, each as a signed Q8.23 word rounded
// to nearest. The contents are computed at elaboration from that formula.
// OFFSET = 1 is used for the subtraction function: it skips the pole at
// d = 0 and puts the table's last sample on the end of its range.
//
// For an input d (unsigned Q8.23) the stencil start is
// i = floor(d/h) - OFFSET, clamped to 0..NSAMP-3, and a quadratic through
// samples i, i+1, i+2 is evaluated in Newton forward form,
//   f(d) ~ f_i + t*D1 + t*(t-1)/2 * D2,  t = d/h - (i + OFFSET),
//   D1 = f_{i+1} - f_i,  D2 = f_{i+2} - 2 f_{i+1} + f_i.
// The caller must keep d below (NSAMP + OFFSET)*h. The stencil choice and
// the use of plain samples (no stored coefficients) are this design's
// choices.
//
// Timing: combinational (ROM read, two multiplies, adds).
module lns_interp #(
  parameter bit FUNC      = 1'b0,   // 0: log2(1+2^-d), 1: log2(1-2^-d)
  parameter int STEP_LOG2 = 3,      // sample spacing h = 2^-STEP_LOG2
  parameter int NSAMP     = 184,    // number of ROM samples
  parameter int OFFSET    = 0       // position of sample 0, in steps
) (
  input  logic [30:0]        d,     // unsigned Q8.23
  output logic signed [33:0] f      // Q8.23, sign-extended
);

  localparam int TF = 23 - STEP_LOG2;          // fraction bits of t
  localparam int IW = $clog2(NSAMP);           // ROM address width
  typedef logic signed [31:0] rom_t [NSAMP];

  function automatic real gauss_log(input real x);
    if (FUNC == 1'b0) return $ln(1.0 + $pow(2.0, -x)) / $ln(2.0);
    else              return $ln(1.0 - $pow(2.0, -x)) / $ln(2.0);
  endfunction

  function automatic rom_t gen_rom();
    rom_t r;
    real  h, x, v;
    h = $pow(2.0, -real'(STEP_LOG2));
    for (int k = 0; k < NSAMP; k++) begin
      x = real'(k + OFFSET) * h;
      v = gauss_log(x) * 8388608.0;
      r[k] = 32'(longint'(v));
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  logic signed [32:0]  k_raw;
  logic signed [32:0]  k0;
  logic [IW-1:0]       addr;
  logic signed [33:0]  f0, f1, f2, d1, d2;
  logic signed [33:0]  t_fix;                  // t * 2^TF, 0 <= t < 3 in range
  logic signed [103:0] t_m1, term1, term2;

  always_comb begin
    k_raw = $signed({2'b00, d >> TF}) - 33'sd1 * OFFSET;
    if (k_raw < 33'sd0)                 k0 = 33'sd0;
    else if (k_raw > 33'(NSAMP - 3))    k0 = 33'(NSAMP - 3);
    else                                k0 = k_raw;
    t_fix = $signed({3'b000, d}) - 34'((k0 + 33'(OFFSET)) <<< TF);
    addr  = k0[IW-1:0];
    f0    = 34'(ROM[addr]);
    f1    = 34'(ROM[addr + IW'(1)]);
    f2    = 34'(ROM[addr + IW'(2)]);
    d1    = f1 - f0;
    d2    = f2 - (f1 <<< 1) + f0;
    term1 = (104'(t_fix) * 104'(d1) + (104'sd1 <<< (TF - 1))) >>> TF;
    t_m1  = 104'(t_fix) - (104'sd1 <<< TF);       // (t - 1) * 2^TF
    term2 = (104'(t_fix) * t_m1 * 104'(d2)
             + (104'sd1 <<< (2 * TF))) >>> (2 * TF + 1);
    f     = f0 + 34'(term1) + 34'(term2);
  end

endmodule
