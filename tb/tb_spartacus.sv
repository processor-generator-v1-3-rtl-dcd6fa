// tb_spartacus: end-to-end test of the Spartacus core at its default sizes.
//
// Loads four programs in turn (each while reset is held) and runs them to
// completion: A, the vecadd8_mmx vector program; B, the same result built
// from DADD, MVDU/MVDL and SW; C, the 32-bit instructions with branches and
// memory access; D, the 64-bit instructions and the other vector
// extensions. Results are read through the debug ports and compared with
// values worked out by hand. Cycle counts are checked: every instruction and
// every vector element takes five cycles, so the vector part of A needs 40
// cycles where B's equivalent 40 instructions need 200, a factor of five.
// Mechanism counters (vector elements, dual-port writes, taken and
// not-taken branches, HI/LO writes, loads) must each see at least one event.
module tb_spartacus;
  import pg13_pkg::*;
  import pg13_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        prog_we = 1'b0;
  logic [5:0]  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic [5:0]  dbg_dmem_addr = '0;
  logic [31:0] dbg_dmem_data;
  logic [4:0]  dbg_rf32_addr = '0;
  logic [31:0] dbg_rf32_data;
  logic [4:0]  dbg_rf64_addr = '0;
  logic [63:0] dbg_rf64_data;
  logic [31:0] pc, loop_cnt;
  state_e      state;
  logic        loop_en, retire, iteration, branch_taken;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  spartacus dut (.*);

  always #10 clk = ~clk;   // 20 ns period
  always @(posedge clk) cycle <= cycle + 1;

  // cycle stamp of every completed instruction since the last reset
  longint unsigned ret_cycle [64];
  int n_ret = 0;
  always @(posedge clk) begin
    if (!rst_n) n_ret <= 0;
    else if (retire) begin
      ret_cycle[n_ret] <= cycle;
      n_ret <= n_ret + 1;
    end
  end
  logic [63:0] rst_cycle;
  always @(posedge clk) if (!rst_n) rst_cycle <= 64'(cycle);

  // mechanism counters
  int n_iter = 0, n_dual = 0, n_taken = 0, n_not_taken = 0, n_hilo = 0, n_load = 0, n_loop_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (iteration) n_iter++;
    if (iteration && !(loop_cnt > 1)) n_loop_done++;
    if (dut.dmem_we1 && dut.dmem_we2) n_dual++;
    if (branch_taken) n_taken++;
    if (state == ST_WRITEBACK && dut.u_controller.i_branch && !branch_taken) n_not_taken++;
    if (state == ST_WRITEBACK && (dut.u_controller.i_div32 || dut.u_controller.i_muldiv64)) n_hilo++;
    if (state == ST_MEMORY && dut.u_controller.i_lw) n_load++;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(prog_t p);
    rst_n <= 1'b0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 6'(i); prog_data = p[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // run until 'n' instructions have completed
  task automatic run_n(int n);
    while (n_ret < n) @(posedge clk);
    @(negedge clk);
  endtask
  // cycles from the end of reset (or of instruction a-1) to the end of instruction b-1
  function automatic logic [63:0] span(int a, int b);
    return 64'((b == 0 ? 0 : ret_cycle[b-1]) - (a == 0 ? rst_cycle : 64'(ret_cycle[a-1])));
  endfunction

  task automatic check_mem(string what, int a, logic [63:0] exp);
    dbg_dmem_addr = 6'(a); #1;
    check(what, 64'(dbg_dmem_data), exp);
  endtask
  task automatic check_r32(string what, int a, logic [63:0] exp);
    dbg_rf32_addr = 5'(a); #1;
    check(what, 64'(dbg_rf32_data), exp);
  endtask
  task automatic check_r64(string what, int a, logic [63:0] exp);
    dbg_rf64_addr = 5'(a); #1;
    check(what, dbg_rf64_data, exp);
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_t p;
    int len;
    logic [63:0] c_vec, c_scalar;

    // ---------------- A: vecadd8_mmx
    p = prog_vector(len);
    load(p);
    run_n(len);
    c_vec = span(16, 17);
    check("A preload cycles", span(0, 16), 64'(16 * 5));
    check("A vector cycles", c_vec, 64'(8 * 5));
    check("A pc", 64'(pc), 64'(len));
    for (int k = 0; k < 8; k++) begin
      check_mem($sformatf("A mem[%0d]", 16 - 2*k), 16 - 2*k, 64'd0);
      check_mem($sformatf("A mem[%0d]", 17 - 2*k), 17 - 2*k, 64'(360 - 2*k));
    end
    for (int i = 1; i <= 16; i++)
      check_r64($sformatf("A R%0d", i), i, 64'(int'((i <= 8) ? 12 + i : 324 + i)));

    // ---------------- B: same result without the extension
    p = prog_scalar(len);
    load(p);
    run_n(len);
    c_scalar = span(16, len);
    check("B scalar cycles", c_scalar, 64'(40 * 5));
    check("B speedup x5", c_scalar, 64'(5 * c_vec));
    for (int j = 1; j <= 8; j++) begin
      check_mem($sformatf("B mem[%0d]", 2*j - 1), 2*j - 1, 64'd0);
      check_mem($sformatf("B mem[%0d]", 2*j), 2*j, 64'(344 + 2*j));
    end

    // ---------------- C: 32-bit base instructions
    p = prog_base32(len);
    load(p);
    run_n(33);
    check("C cycles", span(0, 33), 64'(33 * 5));
    check("C pc", 64'(pc), 64'(len));
    begin
      automatic logic [31:0] exp [18] = '{0, 0, 15, 100, 7, 2, 14, 16, 14, 'h60, 15, 0,
                                32'hFFFF_FFFB, 613566755, 6, 2, 32'hFFFF_FFFF, 2};
      for (int i = 1; i < 18; i++) check_r32($sformatf("C R%0d", i), i, 64'(exp[i]));
    end
    check_mem("C mem[20]", 20, 64'd16);
    check_mem("C mem[21]", 21, 64'd15);

    // ---------------- D: 64-bit base instructions and extensions
    p = prog_base64(len);
    load(p);
    run_n(len);
    check("D cycles", span(0, len), 64'(int'((len - 2) * 5 + 2 * 10)));
    check_r64("D R1", 1, -64'sd3);
    check_r64("D R2", 2, 64'd1000);
    check_r64("D R3", 3, '1);
    check_r64("D R4", 4, -64'sd3000);
    check_r64("D R5", 5, -64'sd3);
    check_r64("D R6", 6, 64'd16000);
    check_r64("D R7", 7, 64'd2);
    check_r64("D R8", 8, '1);
    check_r64("D R9", 9, 64'h3FFF_FFFF_FFFF_FFFF);
    check_r64("D R10", 10, 64'd998);
    check_r64("D R11", 11, 64'd125);
    check_r64("D R12", 12, -64'sd2);
    check_r64("D R13", 13, 64'd4000);
    check_r64("D R14", 14, 64'd1002);
    check_r64("D R15", 15, -64'sd998);
    check_r64("D R16", 16, 64'd1);
    check_r64("D R17", 17, 64'd500);
    check_r64("D R18", 18, 64'd1002);
    check_r64("D R24 pavgb", 24, 64'h8080_8080_8080_BFFF);
    check_r32("D rf32 R1 mvdu", 1, 64'hFFFF_FFFF);
    check_r32("D rf32 R2 mvdl", 2, 64'd1000);
    check_mem("D mem[12]", 12, 64'd11);
    check_mem("D mem[13]", 13, 64'd22);
    check_mem("D mem[30]", 30, 64'hFFFF_FFFF);
    check_mem("D mem[31]", 31, 64'hFFFF_0000);
    check_mem("D mem[28]", 28, 64'd0);
    check_mem("D mem[29]", 29, 64'h0000_8000);

    // ---------------- mechanisms
    $display("mechanisms: vector elements=%0d loops done=%0d dual writes=%0d taken=%0d not taken=%0d hilo=%0d loads=%0d",
             n_iter, n_loop_done, n_dual, n_taken, n_not_taken, n_hilo, n_load);
    check("vector elements", 64'(n_iter), 64'(8 + 2 + 2));
    check("vector loops completed", 64'(n_loop_done), 64'd3);
    check("dual-port writes", 64'(n_dual), 64'(8 + 2));
    check("taken branches", 64'(n_taken), 64'd5);
    check("not-taken branches seen", 64'(n_not_taken > 0), 64'd1);
    check("HI/LO writes seen", 64'(n_hilo > 0), 64'd1);
    check("loads seen", 64'(n_load > 0), 64'd1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
