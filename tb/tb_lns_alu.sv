// tb_lns_alu: self-checking test of the LNS arithmetic unit. Random signed
// operands go through every operation code with both add/subtract
// algorithms; the reference computes the real values (-1)^S * 2^E in double
// precision, applies the operation and takes log2 of the result. Multiply
// and divide must be exact; add/subtract must be within the error bound of
// the selected algorithm (operand distances are kept above 2^-5, where
// algorithm 1's bound is 16000 LSB and algorithm 2's is 2 LSB). The test
// also checks that each routing case (adder / subtractor, each algorithm)
// was exercised.
module tb_lns_alu;
  import tb_ref_pkg::*;
  import fp_pkg::arith_op_e, fp_pkg::OP_ADD, fp_pkg::OP_SUB, fp_pkg::OP_MUL, fp_pkg::OP_DIV;

  logic [31:0] a, b, z;
  arith_op_e   op;
  logic        alg, ovf, unf;
  int          checks = 0, failures = 0;
  int          route [4];   // {alg, subtractor used}

  lns_alu dut (.a(a), .b(b), .op(op), .alg(alg), .z(z), .overflow(ovf), .underflow(unf));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input arith_op_e top, input logic talg);
    real ea, eb, va, vb, r, want, err, tol, d;
    a = ta; b = tb_; op = top; alg = talg;
    #1;
    checks++;
    ea = lns_log(ta[30:0]);
    eb = lns_log(tb_[30:0]);
    va = (ta[31] ? -1.0 : 1.0) * $pow(2.0, ea);
    vb = (tb_[31] ? -1.0 : 1.0) * $pow(2.0, eb);
    d  = (ea > eb) ? ea - eb : eb - ea;
    case (top)
      OP_ADD: r = va + vb;
      OP_SUB: r = va - vb;
      OP_MUL: r = va * vb;
      default: r = va / vb;
    endcase
    if (top == OP_ADD || top == OP_SUB) begin
      route[{talg, ta[31] ^ tb_[31] ^ (top == OP_SUB)}]++;
      tol = talg ? 2.0 : 16000.0;
    end else begin
      tol = 0.5;
    end
    want = log2r(r < 0.0 ? -r : r);
    err  = (lns_log(z[30:0]) - want) * 8388608.0;
    if (err < 0.0) err = -err;
    if (ovf || unf || z[31] != (r < 0.0) || err > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL op %0d alg %0d a=%h b=%h: z=%h want log %f sign %b (err %f LSB)",
                 top, talg, ta, tb_, z, want, r < 0.0, err);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8000; i++) begin
      logic [31:0] x, y;
      x = rand_lns(-60, 60);
      y = rand_lns(-60, 60);
      if ((i % 3) == 0) y[30:0] = x[30:0] + 31'($urandom % 8388608) + 31'd262144;
      check(x, y, arith_op_e'(i % 4), 1'(i / 4));
    end
    // equal magnitudes cancel to the zero code
    a = 32'h0123_4567; b = 32'h0123_4567; op = OP_SUB; alg = 1'b0; #1; checks++;
    if (z !== 32'h4000_0000) begin failures++; $display("FAIL cancellation alg1"); end
    alg = 1'b1; #1; checks++;
    if (z !== 32'h4000_0000) begin failures++; $display("FAIL cancellation alg2"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (route[k] == 0) begin failures++; $display("FAIL route %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
