// tb_fp_lns_top: end-to-end test of the FP and LNS arithmetic units at
// their default sizes (184-word addition ROM, 184+248-word subtraction ROM).
//
// Part 1 runs the three operand pairs (A, B) = (57.88618, 16.92117),
// (54.24420, 48.25241), (57.88618, 48.25241) through A+B and A-B in both
// number systems and with both LNS algorithms, prints the decimal results
// next to the exact ones and checks them against each unit's error bound.
// Part 2 drives random operands through every operation. Each mechanism of
// the design is counted and must occur at least once:
//   FP:  carry-out normalisation, cancellation (left-shift) normalisation,
//        round-up, overflow, underflow, divide by zero, quotient below 1,
//        infinity or NaN operand
//   LNS: multiply, divide, adder and subtractor with algorithm 1 and 2,
//        fine subtraction table (d < 0.5), d beyond the tables, exact
//        cancellation to the zero code, overflow, underflow
module tb_fp_lns_top;
  import tb_ref_pkg::*;
  import fp_pkg::*;

  logic [31:0] fp_a, fp_b, fp_z, lns_a, lns_b, lns_z;
  arith_op_e   fp_op, lns_op;
  logic        lns_alg;
  logic        fp_ovf, fp_unf, lns_ovf, lns_unf;
  int          checks = 0, failures = 0;

  typedef enum int {
    M_FP_CARRY, M_FP_CANCEL, M_FP_ROUNDUP, M_FP_OVF, M_FP_UNF, M_FP_DIV0, M_FP_QLT1, M_FP_SPECIAL,
    M_LNS_MUL, M_LNS_DIV, M_ADD1, M_SUB1, M_ADD2, M_SUB2, M_FINE, M_BEYOND,
    M_ZERO, M_LNS_OVF, M_LNS_UNF, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  fp_lns_top dut (
    .fp_a(fp_a), .fp_b(fp_b), .fp_op(fp_op), .fp_z(fp_z),
    .fp_overflow(fp_ovf), .fp_underflow(fp_unf),
    .lns_a(lns_a), .lns_b(lns_b), .lns_op(lns_op), .lns_alg(lns_alg), .lns_z(lns_z),
    .lns_overflow(lns_ovf), .lns_underflow(lns_unf)
  );

  function automatic real lns_value(input logic [31:0] w);
    if (w[30:0] == 31'h4000_0000) return 0.0;
    return (w[31] ? -1.0 : 1.0) * $pow(2.0, lns_log(w[30:0]));
  endfunction

  function automatic logic [31:0] to_lns(input real v);
    return {v < 0.0, log_to_lg(log2r(v < 0.0 ? -v : v))};
  endfunction

  // ---------------- floating point ----------------
  task automatic fp_check(input logic [31:0] ta, input logic [31:0] tb_, input arith_op_e top);
    real ra, rb, r;
    logic [33:0] want;
    fp_a = ta; fp_b = tb_; fp_op = top;
    #1;
    ra = fp_to_real(ta);
    rb = fp_to_real(tb_);
    case (top)
      OP_ADD:  r = ra + rb;
      OP_SUB:  r = ra - rb;
      OP_MUL:  r = ra * rb;
      default: r = (rb == 0.0) ? 0.0 : ra / rb;
    endcase
    want = real_to_fp(r);
    if (top == OP_DIV && rb == 0.0) begin
      if (is_nan(ta) || is_zero(ta)) want = {2'b00, 32'h7FC0_0000};
      else if (is_inf(ta))           want = {2'b00, ta[31] ^ tb_[31], 8'hFF, 23'd0};
      else begin
        want = {2'b10, ta[31] ^ tb_[31], 8'hFF, 23'd0};
        seen[M_FP_DIV0]++;
      end
    end
    if (ta[30:23] == 8'hFF || tb_[30:23] == 8'hFF) seen[M_FP_SPECIAL]++;
    if (top == OP_DIV && rb != 0.0 && {1'b1, ta[22:0]} < {1'b1, tb_[22:0]}) seen[M_FP_QLT1]++;
    if ((top == OP_ADD || top == OP_SUB) && want[33:32] == 2'b00 && r != 0.0) begin
      if (want[30:23] > ta[30:23] && want[30:23] > tb_[30:23]) seen[M_FP_CARRY]++;
      if (want[30:23] + 8'd1 < ta[30:23] && want[30:23] + 8'd1 < tb_[30:23]) seen[M_FP_CANCEL]++;
    end
    if (want[33:32] == 2'b00 && r != 0.0 && (r < 0.0 ? -r : r) < (fp_to_real(want[31:0]) < 0.0 ? -fp_to_real(want[31:0]) : fp_to_real(want[31:0])))
      seen[M_FP_ROUNDUP]++;
    if (want[33]) seen[M_FP_OVF]++;
    if (want[32]) seen[M_FP_UNF]++;
    checks++;
    if ({fp_ovf, fp_unf, fp_z} !== want) begin
      failures++;
      if (failures < 10) $display("FAIL fp op %0d %h %h: got %h want %h", top, ta, tb_, fp_z, want);
    end
  endtask

  // ---------------- LNS ----------------
  task automatic lns_check(input logic [31:0] ta, input logic [31:0] tb_, input arith_op_e top,
                           input logic talg, input bit show);
    real va, vb, r, d, want, err, tol;
    logic use_sub;
    lns_a = ta; lns_b = tb_; lns_op = top; lns_alg = talg;
    #1;
    checks++;
    va = lns_value(ta);
    vb = lns_value(tb_);
    d  = lns_log(ta[30:0]) - lns_log(tb_[30:0]);
    if (d < 0.0) d = -d;
    use_sub = ta[31] ^ tb_[31] ^ (top == OP_SUB);
    case (top)
      OP_ADD:  r = va + vb;
      OP_SUB:  r = va - vb;
      OP_MUL:  r = va * vb;
      default: r = va / vb;
    endcase
    if (top == OP_MUL) seen[M_LNS_MUL]++;
    if (top == OP_DIV) seen[M_LNS_DIV]++;
    if (top == OP_ADD || top == OP_SUB) begin
      seen[talg ? (use_sub ? M_SUB2 : M_ADD2) : (use_sub ? M_SUB1 : M_ADD1)]++;
      if (!talg && use_sub && d > 0.0 && d < 0.5) seen[M_FINE]++;
      if (d >= 23.0) seen[M_BEYOND]++;
    end
    if (r == 0.0) begin
      seen[M_ZERO]++;
      if (lns_z[30:0] !== 31'h4000_0000 || lns_ovf || lns_unf) begin
        failures++;
        $display("FAIL lns zero: a=%h b=%h z=%h", ta, tb_, lns_z);
      end
      return;
    end
    want = log2r(r < 0.0 ? -r : r);
    if (want >= 128.0) begin
      seen[M_LNS_OVF]++;
      if (!lns_ovf) begin failures++; $display("FAIL lns overflow missed a=%h b=%h", ta, tb_); end
      return;
    end
    if (want <= -128.0) begin
      seen[M_LNS_UNF]++;
      if (!lns_unf) begin failures++; $display("FAIL lns underflow missed a=%h b=%h", ta, tb_); end
      return;
    end
    if (top == OP_MUL || top == OP_DIV) tol = 0.5;
    else if (talg)                       tol = 2.0;
    else if (!use_sub)                   tol = 64.0;
    else                                 tol = 16000.0;   // d >= 2^-5 here
    err = (lns_log(lns_z[30:0]) - want) * 8388608.0;
    if (err < 0.0) err = -err;
    if (show)
      $display("  LNS alg %0d  %s  result %10.5f  exact %10.5f", talg + 1, top == OP_ADD ? "A+B" : "A-B",
               lns_value(lns_z), r);
    if (lns_ovf || lns_unf || lns_z[31] != (r < 0.0) || err > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL lns op %0d alg %0d a=%h b=%h: z=%h err %f LSB", top, talg, ta, tb_, lns_z, err);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ex_a [3] = '{57.88618, 54.24420, 57.88618};
    real ex_b [3] = '{16.92117, 48.25241, 48.25241};

    // Part 1: the example operand pairs
    for (int i = 0; i < 3; i++) begin
      logic [33:0] fa, fb;
      fa = real_to_fp(ex_a[i]);
      fb = real_to_fp(ex_b[i]);
      $display("A = %f, B = %f", ex_a[i], ex_b[i]);
      for (int o = 0; o < 2; o++) begin
        fp_check(fa[31:0], fb[31:0], arith_op_e'(o));
        $display("  FP         %s  result %10.5f  exact %10.5f", o == 0 ? "A+B" : "A-B",
                 fp_to_real(fp_z), o == 0 ? ex_a[i] + ex_b[i] : ex_a[i] - ex_b[i]);
        for (int g = 0; g < 2; g++)
          lns_check(to_lns(ex_a[i]), to_lns(ex_b[i]), arith_op_e'(o), 1'(g), 1'b1);
      end
    end

    // Part 2a: directed FP corner cases
    fp_check(32'h3F80_0000, 32'h3F80_0000, OP_ADD);     // carry
    fp_check(32'h3F80_0001, 32'h3F80_0000, OP_SUB);     // cancellation
    fp_check(32'h7F7F_FFFF, 32'h7F7F_FFFF, OP_ADD);     // overflow
    fp_check(32'h0080_0000, 32'h3F00_0000, OP_MUL);     // underflow
    fp_check(32'h3F80_0000, 32'h0000_0000, OP_DIV);     // divide by zero
    fp_check(32'h3F80_0000, 32'h3FC0_0000, OP_DIV);     // quotient below 1
    fp_check(32'h7F80_0000, 32'hFF80_0000, OP_ADD);     // inf + -inf = NaN
    fp_check(32'h0000_0000, 32'h7F80_0000, OP_MUL);     // 0 * inf = NaN
    fp_check(32'h7FC0_0000, 32'h4000_0000, OP_MUL);     // NaN * 2
    fp_check(32'hFF80_0000, 32'h4040_0000, OP_DIV);     // -inf / 3
    fp_check(32'h4040_0000, 32'h7F80_0000, OP_SUB);     // 3 - inf

    // Part 2b: directed LNS corner cases
    lns_check(32'h0123_4567, 32'h0123_4567, OP_SUB, 1'b0, 1'b0);   // cancellation
    lns_check(32'h0123_4567, 32'h0123_4567, OP_SUB, 1'b1, 1'b0);
    lns_check(32'h0000_0000, 32'h0C80_0000, OP_ADD, 1'b0, 1'b0);   // d = 25
    lns_check(32'h3F00_0000, 32'h0100_0000, OP_MUL, 1'b0, 1'b0);   // overflow
    lns_check(32'h4100_0000, 32'h0100_0000, OP_DIV, 1'b0, 1'b0);   // underflow

    // Part 2c: random traffic through both units
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] x, y;
      fp_check(rand_fp(1, 254), rand_fp(1, 254), arith_op_e'(i % 4));
      fp_check(rand_fp(110, 140), rand_fp(110, 140), arith_op_e'((i / 4) % 4));
      x = rand_lns(-60, 60);
      y = rand_lns(-60, 60);
      if (i % 2 == 0) y[30:0] = x[30:0] + 31'(($urandom % 8388608) >> ($urandom % 10)) + 31'd262144;
      lns_check(x, y, arith_op_e'(i % 4), 1'((i / 4) % 2), 1'b0);
    end

    for (int m = 0; m < int'(M_COUNT); m++) begin
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("mechanism counts:");
    for (int m = 0; m < int'(M_COUNT); m++) $display("  %-12s %0d", mech_e'(m), seen[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
