// tb_regfile: self-checking test of the register file, 32- and 64-bit.
// Random writes and reads on all three read ports are compared with a model
// array; checks reset to zero and that a same-cycle read returns the old value.
module tb_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] ra1 = '0, ra2 = '0, wa = '0, da = '0;
  logic we = 1'b0;
  logic [31:0] wd32 = '0, r1_32, r2_32, d_32;
  logic [63:0] wd64 = '0, r1_64, r2_64, d_64;
  logic [31:0] m32 [32];
  logic [63:0] m64 [32];
  int checks = 0, failures = 0;

  regfile #(.WIDTH(32), .DEPTH(32)) u32 (.clk, .rst_n, .raddr1(ra1), .rdata1(r1_32), .raddr2(ra2), .rdata2(r2_32),
    .we, .waddr(wa), .wdata(wd32), .dbg_addr(da), .dbg_data(d_32));
  regfile #(.WIDTH(64), .DEPTH(32)) u64 (.clk, .rst_n, .raddr1(ra1), .rdata1(r1_64), .raddr2(ra2), .rdata2(r2_64),
    .we, .waddr(wa), .wdata(wd64), .dbg_addr(da), .dbg_data(d_64));

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      m32[i] = '0; m64[i] = '0;
      da = 5'(i); #1; check("reset32", 64'(d_32), 0); check("reset64", d_64, 0);
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom_range(0, 3) != 0);
      wa = 5'($urandom); wd32 = $urandom; wd64 = {$urandom, $urandom};
      ra1 = 5'($urandom); ra2 = (i % 4 == 0) ? wa : 5'($urandom); da = 5'($urandom);
      #1;
      check("rd1_32", 64'(r1_32), 64'(m32[ra1])); check("rd2_32", 64'(r2_32), 64'(m32[ra2]));
      check("rd1_64", r1_64, m64[ra1]);           check("rd2_64", r2_64, m64[ra2]);
      check("dbg32", 64'(d_32), 64'(m32[da]));    check("dbg64", d_64, m64[da]);
      @(negedge clk);
      if (we) begin m32[wa] = wd32; m64[wa] = wd64; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
