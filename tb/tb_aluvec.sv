// tb_aluvec: self-checking test of the vector ALU.
// Checks VADD32 on the document's example values (13+333 .. 20+340 in the
// low halves), lane independence (no carry between lanes) for VADD32 and
// VADD16, and PAVGB rounding, then random operands against a lane model.
module tb_aluvec;
  import pg13_pkg::*;
  logic [5:0]  operation = OP_VADD32;
  logic [63:0] source1 = '0, source2 = '0, result;
  int checks = 0, failures = 0;

  aluvec dut (.*);

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic apply(logic [5:0] op, logic [63:0] a, logic [63:0] b, logic [63:0] exp);
    operation = op; source1 = a; source2 = b; #1;
    check($sformatf("op %b %h %h", op, a, b), result, exp);
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++)
      apply(OP_VADD32, 64'(13 + k), 64'(333 + k), 64'(346 + 2*k));
    apply(OP_VADD32, 64'h0000_0001_FFFF_FFFF, 64'h0000_0002_0000_0001, 64'h0000_0003_0000_0000);
    apply(OP_VADD16, 64'hFFFF_FFFF_FFFF_FFFF, 64'h0000_0000_0000_0001, 64'hFFFF_FFFF_FFFF_0000);
    apply(OP_VADD16, 64'h0001_0002_0003_7FFF, 64'h0001_0001_0001_0001, 64'h0002_0003_0004_8000);
    apply(OP_PAVGB,  64'hFFFF_FFFF_FFFF_FFFF, 64'h0000_0000_0000_7FFF, 64'h8080_8080_8080_BFFF);
    apply(OP_PAVGB,  64'h0102_0304_0506_0708, 64'h0102_0304_0506_0709, 64'h0102_0304_0506_0709);
    for (int i = 0; i < 500; i++) begin
      logic [63:0] a, b, e32, e16, eb;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      e32 = {32'(a[63:32] + b[63:32]), 32'(a[31:0] + b[31:0])};
      for (int l = 0; l < 4; l++) e16[16*l +: 16] = a[16*l +: 16] + b[16*l +: 16];
      for (int l = 0; l < 8; l++) eb[8*l +: 8] = 8'((int'(a[8*l +: 8]) + int'(b[8*l +: 8]) + 1) / 2);
      apply(OP_VADD32, a, b, e32);
      apply(OP_VADD16, a, b, e16);
      apply(OP_PAVGB, a, b, eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
