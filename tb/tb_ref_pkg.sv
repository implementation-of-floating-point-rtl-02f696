// tb_ref_pkg: reference arithmetic for the testbenches, computed with
// double-precision reals independently of the design.
//   fp_to_real / real_to_fp  convert IEEE-754 single words to and from real,
//                            rounding to nearest-even on the way back and
//                            flagging results outside the normal range
//   lns_log / log_to_lg      convert an LNS word's log part to a real log2
//                            and back to the Q8.23 field
package tb_ref_pkg;

  function automatic real fp_to_real(input logic [31:0] w);
    logic [63:0] d;
    if (w[30:23] == 8'd0) return 0.0;
    if (w[30:23] == 8'hFF) return $bitstoreal({w[31], 11'h7FF, w[22:0], 29'd0});
    d = {w[31], 11'(int'(w[30:23]) - 127 + 1023), w[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Round a real to single precision. Returns {overflow, underflow, word}.
  // An infinite or NaN real maps to infinity or the quiet NaN, with no flag.
  function automatic logic [33:0] real_to_fp(input real r);
    logic [63:0] d;
    logic [52:0] sig;
    logic [24:0] m;
    logic        g, st;
    int          e;
    if (r == 0.0) return {2'b00, 32'd0};
    d   = $realtobits(r);
    if (d[62:52] == 11'h7FF)
      return (d[51:0] != 52'd0) ? {2'b00, 32'h7FC0_0000} : {2'b00, d[63], 8'hFF, 23'd0};
    sig = {1'b1, d[51:0]};
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {1'b0, sig[52:29]};
    g   = sig[28];
    st  = |sig[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e > 254) return {2'b10, d[63], 8'hFF, 23'd0};
    if (e < 1)   return {2'b01, d[63], 31'd0};
    return {2'b00, d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic is_nan(input logic [31:0] w);
    return w[30:23] == 8'hFF && w[22:0] != 23'd0;
  endfunction

  function automatic logic is_inf(input logic [31:0] w);
    return w[30:23] == 8'hFF && w[22:0] == 23'd0;
  endfunction

  function automatic logic is_zero(input logic [31:0] w);
    return w[30:23] == 8'd0;
  endfunction

  function automatic real lns_log(input logic [30:0] lg);
    return real'($signed(lg)) / 8388608.0;
  endfunction

  function automatic logic [30:0] log_to_lg(input real l);
    return 31'($rtoi(l * 8388608.0 + ((l >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  // Random single with exponent in [lo, hi]; exponent 255 gives inf or NaN.
  function automatic logic [31:0] rand_fp(input int lo, input int hi);
    return {1'($urandom), 8'(lo + int'($urandom % 32'(hi - lo + 1))), 23'($urandom)};
  endfunction

  // Random LNS word with log in [lo, hi) (integers).
  function automatic logic [31:0] rand_lns(input int lo, input int hi);
    logic signed [31:0] v;
    v = 32'(lo) * 32'sd8388608 + 32'($urandom % 32'((hi - lo) * 8388608));
    return {1'($urandom), v[30:0]};
  endfunction

endpackage
