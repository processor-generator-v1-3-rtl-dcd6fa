// tb_alu64: self-checking test of the 64-bit ALU.
// Hand-worked vectors for every operation, then random operands compared
// with a testbench reference (shift-and-add multiply, long division,
// bit-by-bit shifts).
module tb_alu64;
  import pg13_pkg::*;
  logic [5:0]  operation = OP_DADD, shamt = '0;
  logic [63:0] source1 = '0, source2 = '0, result, result_hi;
  int checks = 0, failures = 0;

  alu64 dut (.*);

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [127:0] umul(logic [63:0] a, logic [63:0] b);
    logic [127:0] acc = '0;
    for (int i = 0; i < 64; i++) if (b[i]) acc = acc + ({64'd0, a} << i);
    return acc;
  endfunction

  function automatic void udiv(logic [63:0] n, logic [63:0] d, output logic [63:0] q, output logic [63:0] r);
    logic [64:0] rem = '0;
    q = '0;
    for (int i = 63; i >= 0; i--) begin
      rem = {rem[63:0], n[i]};
      if (rem >= {1'b0, d}) begin rem = rem - {1'b0, d}; q[i] = 1'b1; end
    end
    r = rem[63:0];
  endfunction

  function automatic logic [63:0] shl(logic [63:0] v, int n);
    for (int i = 0; i < n; i++) v = {v[62:0], 1'b0};
    return v;
  endfunction
  function automatic logic [63:0] shr(logic [63:0] v, int n, bit arith);
    for (int i = 0; i < n; i++) v = {arith ? v[63] : 1'b0, v[63:1]};
    return v;
  endfunction

  task automatic apply(logic [5:0] op, logic [63:0] a, logic [63:0] b, logic [5:0] sa,
                       logic [63:0] exp, logic [63:0] exp_hi);
    operation = op; source1 = a; source2 = b; shamt = sa; #1;
    check($sformatf("op %b %h %h %0d", op, a, b, sa), result, exp);
    check($sformatf("op %b %h %h %0d hi", op, a, b, sa), result_hi, exp_hi);
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    apply(OP_DADD,  64'd20, 64'd340, 0, 64'd360, 0);
    apply(OP_DSUB,  64'd2, 64'd1000, 0, -64'sd998, 0);
    apply(OP_DMULT, -64'sd3, 64'd1000, 0, -64'sd3000, '1);
    apply(OP_DMULTU, -64'sd3, 64'd2, 0, -64'sd6, 64'd1);
    apply(OP_DDIV,  -64'sd3000, 64'd1000, 0, -64'sd3, 0);
    apply(OP_DDIVU, 64'd1001, 64'd2, 0, 64'd500, 64'd1);
    apply(OP_DSLL,  0, 64'd1000, 6'd4, 64'd16000, 0);
    apply(OP_DSRA,  0, -64'sd3, 6'd1, -64'sd2, 0);
    apply(OP_DSRLV, 64'd2, -64'sd3, 0, 64'h3FFF_FFFF_FFFF_FFFF, 0);
    for (int i = 0; i < 300; i++) begin
      logic [63:0] a, b, c, q, r, qa, ra, am, bm;
      logic [127:0] p;
      logic [5:0] s;
      a = {$urandom, $urandom}; b = {$urandom, $urandom} >> $urandom_range(0, 63); s = 6'($urandom); c = {$urandom, $urandom};
      apply(OP_DADD,  a, b, s, a + b, 0);
      apply(OP_DADDU, a, b, s, a + b, 0);
      apply(OP_DSUB,  a, b, s, a + ~b + 64'd1, 0);
      apply(OP_DSUBU, a, b, s, a + ~b + 64'd1, 0);
      p = umul(a, b);
      apply(OP_DMULTU, a, b, s, p[63:0], p[127:64]);
      am = a[63] ? -a : a; bm = b[63] ? -b : b;
      p = umul(am, bm); if (a[63] ^ b[63]) p = -p;
      apply(OP_DMULT, a, b, s, p[63:0], p[127:64]);
      if (b != 0) begin
        udiv(a, b, q, r);
        apply(OP_DDIVU, a, b, s, q, r);
        udiv(am, bm, qa, ra);
        apply(OP_DDIV, a, b, s, (a[63] ^ b[63]) ? -qa : qa, a[63] ? -ra : ra);
      end
      apply(OP_DSLL, a, c, {1'b0, s[4:0]}, shl(c, int'(s[4:0])), 0);
      apply(OP_DSRL, a, c, {1'b0, s[4:0]}, shr(c, int'(s[4:0]), 0), 0);
      apply(OP_DSRA, a, c, {1'b0, s[4:0]}, shr(c, int'(s[4:0]), 1), 0);
      apply(OP_DSLLV, a, c, s, shl(c, int'(a[5:0])), 0);
      apply(OP_DSRLV, a, c, s, shr(c, int'(a[5:0]), 0), 0);
      apply(OP_DSRAV, a, c, s, shr(c, int'(a[5:0]), 1), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
