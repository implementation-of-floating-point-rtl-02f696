// tb_lns_rom_sizes: accuracy of the table-lookup LNS adder and subtractor
// for every ROM size of the design's family: adder with 92 and 184 words,
// subtractor with 184, 192, 208, 240, 304 and 432 words (0 to 5 fine
// levels). Each variant runs the three example operand pairs
// (57.88618, 16.92117), (54.24420, 48.25241), (57.88618, 48.25241), printing
// the decimal results, and a random sweep of operand distances. Checks: each
// variant's log error stays within its bound, and over the sweep the
// largest error never grows when words are added.
module tb_lns_rom_sizes;
  import tb_ref_pkg::*;

  localparam int NSUB = 6;

  logic [31:0] a, b;
  logic [31:0] z_add [2];
  logic [31:0] z_sub [NSUB];
  logic        o_unused [2 + NSUB];
  logic        u_unused [2 + NSUB];
  int          checks = 0, failures = 0;

  lns_add_alg1 #(.STEP_LOG2(2)) i_add92  (.a(a), .b(b), .z(z_add[0]), .overflow(o_unused[0]), .underflow(u_unused[0]));
  lns_add_alg1 #(.STEP_LOG2(3)) i_add184 (.a(a), .b(b), .z(z_add[1]), .overflow(o_unused[1]), .underflow(u_unused[1]));
  for (genvar l = 0; l < NSUB; l++) begin : g_sub
    lns_sub_alg1 #(.STEP_LOG2(3), .FINE_LEVELS(l))
      i_sub (.a(a), .b(b), .z(z_sub[l]), .overflow(o_unused[2 + l]), .underflow(u_unused[2 + l]));
  end

  function automatic real val(input logic [31:0] w);
    return $pow(2.0, lns_log(w[30:0]));
  endfunction

  function automatic real abs_r(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ex_a [3] = '{57.88618, 54.24420, 57.88618};
    real ex_b [3] = '{16.92117, 48.25241, 48.25241};
    int  add_words [2]  = '{92, 184};
    int  sub_words [NSUB] = '{184, 192, 208, 240, 304, 432};
    real worst_add [2];
    real worst_sub [NSUB];
    real add_bound [2] = '{400.0, 64.0};

    for (int i = 0; i < 3; i++) begin
      real ea, eb, sa, ss;
      ea = log2r(ex_a[i]);
      eb = log2r(ex_b[i]);
      a  = {1'b0, log_to_lg(ea)};
      b  = {1'b0, log_to_lg(eb)};
      #1;
      sa = val(a) + val(b);
      ss = val(a) - val(b);
      $display("A = %f  B = %f  d = %f", ex_a[i], ex_b[i], ea - eb);
      for (int k = 0; k < 2; k++)
        $display("  A+B  ROM %3d: %10.5f  (exact %10.5f)", add_words[k], val(z_add[k]), sa);
      for (int l = 0; l < NSUB; l++)
        $display("  A-B  ROM %3d: %10.5f  (exact %10.5f)", sub_words[l], val(z_sub[l]), ss);
    end

    foreach (worst_add[k]) worst_add[k] = 0.0;
    foreach (worst_sub[l]) worst_sub[l] = 0.0;
    for (int i = 0; i < 20000; i++) begin
      real ea, eb, d, e;
      a = {1'b0, 31'($urandom % (8 * 8388608))};
      b = {1'b0, a[30:0] + 31'(((32'($urandom) % (4 * 8388608)) >> ($urandom % 12)) + 4096)};
      #1;
      ea = lns_log(a[30:0]);
      eb = lns_log(b[30:0]);
      d  = eb - ea;
      for (int k = 0; k < 2; k++) begin
        e = abs_r(lns_log(z_add[k][30:0]) - (eb + log2r(1.0 + $pow(2.0, -d)))) * 8388608.0;
        if (e > worst_add[k]) worst_add[k] = e;
      end
      for (int l = 0; l < NSUB; l++) begin
        e = abs_r(lns_log(z_sub[l][30:0]) - (eb + log2r(1.0 - $pow(2.0, -d)))) * 8388608.0;
        if (e > worst_sub[l]) worst_sub[l] = e;
      end
    end
    for (int k = 0; k < 2; k++) begin
      $display("adder      ROM %3d words: largest error %12.1f LSB", add_words[k], worst_add[k]);
      checks++;
      if (worst_add[k] > add_bound[k]) begin failures++; $display("FAIL adder bound"); end
    end
    for (int l = 0; l < NSUB; l++) begin
      $display("subtractor ROM %3d words: largest error %12.1f LSB (d >= 2^-11)", sub_words[l], worst_sub[l]);
      if (l > 0) begin
        checks++;
        if (worst_sub[l] > worst_sub[l-1]) begin failures++; $display("FAIL error grew with ROM size"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
