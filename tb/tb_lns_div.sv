// tb_lns_div: self-checking test of the LNS divider. The expected log is
// the exact difference of the operand logs, worked out in integers; overflow,
// underflow and zero-code operands are checked with directed cases.
module tb_lns_div;
  logic [31:0] a, b, z;
  logic        ovf, unf;
  int          checks = 0, failures = 0;

  lns_div dut (.a(a), .b(b), .z(z), .overflow(ovf), .underflow(unf));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    longint e;
    logic [33:0] want;
    a = ta; b = tb_;
    #1;
    e = longint'($signed(ta[30:0])) - longint'($signed(tb_[30:0]));
    if (tb_[30:0] == 31'h4000_0000)      want = {2'b10, ta[31] ^ tb_[31], 31'h3FFF_FFFF};
    else if (ta[30:0] == 31'h4000_0000) want = {2'b00, 32'h4000_0000};
    else if (e > 64'sh3FFF_FFFF)    want = {2'b10, ta[31] ^ tb_[31], 31'h3FFF_FFFF};
    else if (e <= -64'sh4000_0000)  want = {2'b01, 32'h4000_0000};
    else                            want = {2'b00, ta[31] ^ tb_[31], e[30:0]};
    checks++;
    if ({ovf, unf, z} !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h o%b u%b want %h", ta, tb_, z, ovf, unf, want);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0080_0000, 32'h0100_0000);   // 2^1 / 2^2 = 2^-1
    check(32'h8080_0000, 32'h7F00_0000);   // -2 / 2^-2
    check(32'h3F00_0000, 32'h7F00_0000);   // 2^126 / 2^-2: overflow
    check(32'h0123_4567, 32'h4000_0000);   // x / zero
    check(32'h4100_0000, 32'h0100_0000);   // 2^-126 / 4: underflow
    check(32'h4000_0000, 32'h0123_4567);   // zero / x
    for (int i = 0; i < 20000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
