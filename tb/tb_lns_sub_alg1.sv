// tb_lns_sub_alg1: self-checking test of lns_sub_alg1, the table-lookup LNS subtractor.
// Equal-sign operand pairs at random distances d = |E_A - E_B| (spread over
// many octaves of d) and directed cases are compared with log2 computed in
// double precision. The allowed error in LSBs of the 23-bit log fraction
// depends on d; the bounds below are the interpolation error of this
// table layout with margin.
module tb_lns_sub_alg1;
  import tb_ref_pkg::*;

  logic [31:0] a, b, z;
  logic        ovf, unf;
  int          checks = 0, failures = 0;
  real         worst = 0.0;

  lns_sub_alg1 dut (.a(a), .b(b), .z(z), .overflow(ovf), .underflow(unf));

  function automatic real tol_lsb(input real d);
    // near the pole the quadratic cannot follow log2(1-2^-d); below
    // d = 2^-8 only the sign and |Z| < |X| are checked (bound 1e12)
    if (d >= 0.5)           return 16000.0;
    if (d >= 1.0 / 32.0)    return 3000.0;
    if (d >= 1.0 / 64.0)    return 16000.0;
    if (d >= 1.0 / 128.0)   return 80000.0;
    if (d >= 1.0 / 256.0)   return 330000.0;
    return 1.0e12;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL a=%h b=%h z=%h o%b u%b: %s", a, b, z, ovf, unf, msg);
  endtask

  // Check one operand pair against the double-precision reference.
  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    real ea, eb, d, big, want, err;
    logic want_sign;
    a = ta; b = tb_;
    #1;
    checks++;
    ea = lns_log(ta[30:0]);
    eb = lns_log(tb_[30:0]);
    d  = (ea >= eb) ? ea - eb : eb - ea;
    big = (ea >= eb) ? ea : eb;
    if (d == 0.0) begin
      if (z[30:0] !== 31'h4000_0000 || ovf || unf) fail("expected zero code");
      return;
    end
    want      = big + log2r(1.0 - $pow(2.0, -d));
    want_sign = (ea >= eb) ? ta[31] : ~ta[31];
    if (want >= 128.0) begin
      if (!ovf || z[30:0] != 31'h3FFF_FFFF) fail("expected overflow");
    end else if (want < -128.0 + 1.0e-6) begin
      if (!unf) fail("expected underflow");
    end else begin
      err = (lns_log(z[30:0]) - want) * 8388608.0;
      if (err < 0.0) err = -err;
      if (err > worst && d > 0.0) worst = err;
      if (ovf || unf || z[31] !== want_sign || err > tol_lsb(d) ||
          $signed(z[30:0]) > $signed(31'(log_to_lg(big))))
        fail($sformatf("want log %f sign %b, error %f LSB (d=%g)", want, want_sign, err, d));
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y;
    check(32'h0100_0000, 32'h0000_0000);                 // 2 - 1 = 1
    check(32'h0000_0000, 32'h0100_0000);                 // 1 - 2 = -1
    check(32'h0123_4567, 32'h0123_4567);                 // equal: zero code
    check(32'h0000_0000, 32'h0C00_0000);                 // d = 24: beyond the table
    check(32'h0123_4567, 32'h0123_4467);                 // tiny d, near the pole
    check(32'h4000_0002, 32'h4000_0001);                 // result below 2^-128: underflow
    a = 32'h4000_0000; b = 32'h0123_4567; #1; checks++;
    if (z !== 32'h8123_4567) fail("zero - b");
    a = 32'h8123_4567; b = 32'h4000_0000; #1; checks++;
    if (z !== 32'h8123_4567) fail("a - zero");
    for (int i = 0; i < 30000; i++) begin
      logic s;
      s = 1'($urandom);
      x = rand_lns(-100, 100);
      x[31] = s;
      // distance: uniform over 0..40 or an octave 2^-k
      if (i % 2 == 0) y = {s, x[30:0] + 31'($urandom % (40 * 8388608))};
      else            y = {s, x[30:0] + 31'(((32'($urandom) % 8388608) >> ($urandom % 20)) + 1)};
      if ($signed(y[30:0]) < $signed(x[30:0])) continue;   // wrapped
      if (i % 3 == 0) check(y, x); else check(x, y);
    end
    $display("largest error %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
