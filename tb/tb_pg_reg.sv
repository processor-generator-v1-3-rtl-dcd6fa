// tb_pg_reg: self-checking test of the register component.
// Drives random data with random enables at widths 32 and 64 and compares q
// with a model register; checks that reset clears and wins over enable.
module tb_pg_reg;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] d32 = '0, q32;
  logic [63:0] d64 = '0, q64;
  logic [31:0] m32;
  logic [63:0] m64;
  int checks = 0, failures = 0;

  pg_reg #(.WIDTH(32)) u32 (.clk, .rst_n, .en, .d(d32), .q(q32));
  pg_reg #(.WIDTH(64)) u64 (.clk, .rst_n, .en, .d(d64), .q(q64));

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); en = 1'b1; d32 = 32'hDEAD_BEEF; d64 = '1;
    @(negedge clk);
    check("reset q32", 64'(q32), 0); check("reset q64", q64, 0);
    rst_n = 1'b1; m32 = 0; m64 = 0;
    for (int i = 0; i < 200; i++) begin
      en  = 1'($urandom_range(0, 1));
      d32 = $urandom; d64 = {$urandom, $urandom};
      if (en) begin m32 = d32; m64 = d64; end
      @(negedge clk);
      check("q32", 64'(q32), 64'(m32)); check("q64", q64, m64);
    end
    en = 1'b0; d32 = 32'h1234_5678;
    @(negedge clk);
    check("hold", 64'(q32), 64'(m32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
