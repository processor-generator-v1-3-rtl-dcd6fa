// tb_dmemory: self-checking test of the dual-ported data memory.
// Random reads and writes on both ports at once are compared with a model
// array (port 2 wins a same-word collision); the debug port is checked too.
module tb_dmemory;
  logic clk = 1'b0;
  logic [31:0] addr1 = '0, addr2 = '0, din1 = '0, din2 = '0, dout1, dout2, dbg_data;
  logic we1 = 1'b0, we2 = 1'b0;
  logic [5:0] dbg_addr = '0;
  logic [31:0] m [64];
  int checks = 0, failures = 0, n_dual = 0;

  dmemory #(.DEPTH(64), .WIDTH(32)) dut (.clk, .addr1, .we1, .din1, .dout1, .addr2, .we2, .din2, .dout2,
    .dbg_addr, .dbg_data);
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // initialise through both ports
    for (int i = 0; i < 64; i += 2) begin
      @(negedge clk);
      we1 = 1'b1; addr1 = 32'(i);     din1 = $urandom; m[i]     = din1;
      we2 = 1'b1; addr2 = 32'(i + 1); din2 = $urandom; m[i + 1] = din2;
    end
    @(negedge clk); we1 = 1'b0; we2 = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      we1 = 1'($urandom_range(0, 1)); we2 = 1'($urandom_range(0, 1));
      addr1 = 32'($urandom_range(0, 63)); addr2 = (i % 16 == 0) ? addr1 : 32'($urandom_range(0, 63));
      din1 = $urandom; din2 = $urandom; dbg_addr = 6'($urandom);
      #1;
      check("dout1", dout1, m[addr1[5:0]]); check("dout2", dout2, m[addr2[5:0]]);
      check("dbg", dbg_data, m[dbg_addr]);
      if (we1 && we2) n_dual++;
      @(negedge clk);
      if (we1) m[addr1[5:0]] = din1;
      if (we2) m[addr2[5:0]] = din2;
    end
    checks++; if (n_dual == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
