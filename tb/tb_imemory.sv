// tb_imemory: self-checking test of the instruction memory.
// Loads random words through the program port, reads them back through the
// 32-bit read port, including addresses above the depth (which wrap).
module tb_imemory;
  logic clk = 1'b0, prog_we = 1'b0;
  logic [5:0]  prog_addr = '0;
  logic [31:0] prog_data = '0, addr = '0, data;
  logic [31:0] m [64];
  int checks = 0, failures = 0;

  imemory #(.DEPTH(64)) dut (.clk, .addr, .data, .prog_we, .prog_addr, .prog_data);
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 6'(i); prog_data = $urandom; m[i] = prog_data;
    end
    @(negedge clk); prog_we = 1'b0;
    for (int i = 0; i < 64; i++) begin addr = 32'(i); #1; check("read", data, m[i]); end
    for (int i = 0; i < 100; i++) begin addr = $urandom; #1; check("wrap", data, m[addr[5:0]]); end
    // overwrite one word
    @(negedge clk); prog_we = 1'b1; prog_addr = 6'd7; prog_data = 32'hCAFE_F00D;
    addr = 32'd7; #1; check("before edge", data, m[7]);
    @(negedge clk); prog_we = 1'b0; check("after edge", data, 32'hCAFE_F00D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
