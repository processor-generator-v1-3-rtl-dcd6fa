// tb_alu32: self-checking test of the 32-bit ALU.
// Hand-worked vectors for every operation, then random operands compared
// with a reference written in the testbench (divide via repeated
// subtraction-free long division on unsigned magnitudes).
module tb_alu32;
  import pg13_pkg::*;
  logic [5:0]  operation = OP_ADD;
  logic [31:0] source1 = '0, source2 = '0, result, result_hi;
  logic        zero, neg;
  int checks = 0, failures = 0;

  alu32 dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // unsigned long division, bit by bit
  function automatic void udiv(logic [31:0] n, logic [31:0] d, output logic [31:0] q, output logic [31:0] r);
    logic [32:0] rem = '0;
    q = '0;
    for (int i = 31; i >= 0; i--) begin
      rem = {rem[31:0], n[i]};
      if (rem >= {1'b0, d}) begin rem = rem - {1'b0, d}; q[i] = 1'b1; end
    end
    r = rem[31:0];
  endfunction

  task automatic apply(logic [5:0] op, logic [31:0] a, logic [31:0] b, logic [31:0] exp, logic [31:0] exp_hi);
    operation = op; source1 = a; source2 = b; #1;
    check($sformatf("op %b %h %h", op, a, b), result, exp);
    check($sformatf("op %b %h %h hi", op, a, b), result_hi, exp_hi);
    check("zero", 32'(zero), 32'(exp == 0));
    check("neg", 32'(neg), 32'(exp[31]));
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    apply(OP_ADD,  32'd13, 32'd340, 32'd353, 0);
    apply(OP_ADDU, 32'hFFFF_FFFF, 32'd2, 32'd1, 0);
    apply(OP_AND,  32'h64, 32'hF0, 32'h60, 0);
    apply(ALU_SUB, 32'd5, 32'd5, 32'd0, 0);
    apply(ALU_SUB, 32'd0, 32'd1, 32'hFFFF_FFFF, 0);
    apply(OP_DIV,  32'd100, 32'd7, 32'd14, 32'd2);
    apply(OP_DIV,  -32'sd100, 32'd7, -32'sd14, -32'sd2);
    apply(OP_DIVU, 32'hFFFF_FFFB, 32'd7, 32'd613566755, 32'd6);
    apply(OP_DIVU, 32'd9, 32'd0, 32'hFFFF_FFFF, 32'd9);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] a, b, q, r, qa, ra;
      a = $urandom; b = $urandom >> $urandom_range(0, 31);
      apply(OP_ADD, a, b, a + b, 0);
      apply(OP_AND, a, b, a & b, 0);
      apply(ALU_SUB, a, b, a + ~b + 1, 0);
      if (b != 0) begin
        udiv(a, b, q, r);
        apply(OP_DIVU, a, b, q, r);
        // signed: divide magnitudes, quotient sign = xor, remainder sign = dividend
        udiv(a[31] ? -a : a, b[31] ? -b : b, qa, ra);
        apply(OP_DIV, a, b, (a[31] ^ b[31]) ? -qa : qa, a[31] ? -ra : ra);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
