// lns_pkg: shared types, constants and helpers for the logarithmic number
// system (LNS) units. A word is a sign bit and a 31-bit two's-complement
// fixed-point base-2 logarithm of the magnitude: 8 integer bits and 23
// fraction bits (value = (-1)^S * 2^E, -128 <= E < 128). The format has no
// zero, so this design reserves the most negative log (E = -128.0, bits 30:0
// = 0x40000000) as the zero code. Results above the largest log saturate and
// flag overflow; results at or below -128.0 become the zero code and flag
// underflow (except an exact cancellation, which is zero without a flag).
package lns_pkg;

  typedef struct packed {
    logic        sign;
    logic [30:0] lg;    // two's-complement Q8.23 log2 of the magnitude
  } lns32_t;

  localparam logic [30:0] LNS_LOG_ZERO = 31'h4000_0000;  // -128.0: zero code
  localparam logic [30:0] LNS_LOG_MAX  = 31'h3FFF_FFFF;  // largest log

  function automatic logic lns_is_zero(input lns32_t v);
    return v.lg == LNS_LOG_ZERO;
  endfunction

  // Turn a wide signed log value into a result word with flags.
  // Returns {overflow, underflow, word}.
  function automatic logic [33:0] lns_pack(input logic s, input logic signed [33:0] e);
    lns32_t r;
    logic ovf, unf;
    ovf = 1'b0;
    unf = 1'b0;
    if (e > 34'sh0_3FFF_FFFF) begin
      ovf = 1'b1;
      r   = '{sign: s, lg: LNS_LOG_MAX};
    end else if (e <= -34'sh0_4000_0000) begin
      unf = 1'b1;
      r   = '{sign: 1'b0, lg: LNS_LOG_ZERO};
    end else begin
      r   = '{sign: s, lg: e[30:0]};
    end
    return {ovf, unf, r};
  endfunction

endpackage
