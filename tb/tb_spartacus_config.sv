// tb_spartacus_config: test of a reduced build of the Spartacus core.
// Builds the core without the AND and DIV instructions and without the
// vector ALU, runs a program that uses them, and checks that each left-out
// instruction behaves as a five-cycle no-op (no register, HI/LO or memory
// change) while the instructions still built, including vecadd32_mem,
// which needs only ALU32, work as usual. A second, otherwise full build
// runs on the falling clock edge: it is loaded and released on rising edges,
// runs the vecadd8_mmx program, and must produce the same results and cycle
// count as the default build, with every state change following a falling
// edge and none a rising one.
module tb_spartacus_config;
  import pg13_pkg::*;
  import pg13_asm_pkg::*;

  localparam logic [NUM_BASE-1:0] ENABLE = ~((NUM_BASE'(1) << B_AND) | (NUM_BASE'(1) << B_DIV));

  logic        clk = 1'b0, rst_n = 1'b0, prog_we = 1'b0;
  logic [5:0]  prog_addr = '0, dbg_dmem_addr = '0;
  logic [31:0] prog_data = '0, dbg_dmem_data, dbg_rf32_data, pc, loop_cnt;
  logic [4:0]  dbg_rf32_addr = '0, dbg_rf64_addr = '0;
  logic [63:0] dbg_rf64_data;
  state_e      state;
  logic        loop_en, retire, iteration, branch_taken;
  int checks = 0, failures = 0, n_ret = 0, n_cyc = 0, ret_at = 0, n_iter = 0;

  spartacus #(.BASE_ENABLE(ENABLE), .HAS_ALUVEC(1'b0)) dut (.*);

  // falling-edge build
  logic        f_rst_n = 1'b0, f_prog_we = 1'b0;
  logic [5:0]  f_prog_addr = '0, f_dbg_dmem_addr = '0;
  logic [31:0] f_prog_data = '0, f_dbg_dmem_data, f_dbg_rf32_data, f_pc, f_loop_cnt;
  logic [63:0] f_dbg_rf64_data;
  state_e      f_state;
  logic        f_loop_en, f_retire, f_iteration, f_branch_taken;
  int f_n_ret = 0, f_n_cyc = 0, f_ret_at = 0, f_rise_changes = 0, f_fall_changes = 0;

  spartacus #(.CLK_RISING(1'b0)) dut_f (
    .clk, .rst_n(f_rst_n),
    .prog_we(f_prog_we), .prog_addr(f_prog_addr), .prog_data(f_prog_data),
    .dbg_dmem_addr(f_dbg_dmem_addr), .dbg_dmem_data(f_dbg_dmem_data),
    .dbg_rf32_addr(5'd0), .dbg_rf32_data(f_dbg_rf32_data),
    .dbg_rf64_addr(5'd0), .dbg_rf64_data(f_dbg_rf64_data),
    .pc(f_pc), .state(f_state), .loop_en(f_loop_en), .loop_cnt(f_loop_cnt),
    .retire(f_retire), .iteration(f_iteration), .branch_taken(f_branch_taken)
  );

  always @(negedge clk) if (f_rst_n) begin
    f_n_cyc <= f_n_cyc + 1;
    if (f_retire) begin f_n_ret <= f_n_ret + 1; f_ret_at <= f_n_cyc + 1; end
  end
  always @(f_state) if (f_rst_n) begin
    if (clk) f_rise_changes++;
    else     f_fall_changes++;
  end

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_cyc <= n_cyc + 1;
    if (retire) begin n_ret <= n_ret + 1; ret_at <= n_cyc + 1; end
    if (iteration) n_iter <= n_iter + 1;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic check_mem(string what, int a, logic [63:0] exp);
    dbg_dmem_addr = 6'(a); #1; check(what, 64'(dbg_dmem_data), exp);
  endtask
  task automatic check_r32(string what, int a, logic [63:0] exp);
    dbg_rf32_addr = 5'(a); #1; check(what, 64'(dbg_rf32_data), exp);
  endtask
  task automatic check_r64(string what, int a, logic [63:0] exp);
    dbg_rf64_addr = 5'(a); #1; check(what, dbg_rf64_data, exp);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic prog_t p = '{default: '0};
    automatic int n = 0;
    p[n++] = sp_i(SP_ADDI, 1, 0, 12);         // R1 = 12
    p[n++] = sp_i(SP_ADDI, 2, 0, 10);         // R2 = 10
    p[n++] = op_r(OP_AND, 3, 1, 2);           // left out: R3 stays 0
    p[n++] = op_r(OP_ADD, 4, 1, 2);           // R4 = 22
    p[n++] = op_r(OP_DIV, 0, 1, 2);           // left out: LO stays 0
    p[n++] = op_r(OP_MFLO, 5, 0, 0);          // R5 = 0
    p[n++] = op_r(OP_DIVU, 0, 1, 2);          // built: LO = 1, HI = 2
    p[n++] = op_r(OP_MFHI, 6, 0, 0);          // R6 = 2
    p[n++] = sp_mem(SP_SW, 16, 4, 0);         // mem[16] = 22
    p[n++] = sp_mem(SP_SW, 17, 4, 0);         // mem[17] = 22
    p[n++] = sp_mem(SP_SW, 5, 2, 0);          // mem[5] = 10
    p[n++] = sp_i(SP_DADDI, 1, 0, 7);         // rf64 R1 = 7
    p[n++] = sp_i(SP_DADDI, 9, 0, 9);         // rf64 R9 = 9
    p[n++] = vecadd8_mmx(16, 1, 9);           // no vector ALU: no-op
    p[n++] = op_r(OP_PAVGB_MMX, 3, 1, 9);     // no vector ALU: rf64 R3 stays 0
    p[n++] = vecadd32_mem(16, 5, 1);          // built: mem[16] = 22 + 10 = 32
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 6'(i); prog_data = p[i];
    end
    @(negedge clk); prog_we = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    while (n_ret < n) @(posedge clk);
    @(negedge clk);
    check("cycles", 64'(ret_at), 64'(n * 5));
    check("vector elements", 64'(n_iter), 64'd1);
    check_r32("R3 (AND left out)", 3, 0);
    check_r32("R4", 4, 22);
    check_r32("R5 (DIV left out)", 5, 0);
    check_r32("R6", 6, 2);
    check_r64("rf64 R3 (pavgb left out)", 3, 0);
    check_r64("rf64 R1", 1, 7);
    check_mem("mem[16]", 16, 32);
    check_mem("mem[17] (vecadd8_mmx left out)", 17, 22);

    // falling-edge build: program A, loaded on rising edges
    begin
      automatic int len;
      p = prog_vector(len);
      for (int i = 0; i < 64; i++) begin
        @(posedge clk); f_prog_we <= 1'b1; f_prog_addr <= 6'(i); f_prog_data <= p[i];
      end
      @(posedge clk); f_prog_we <= 1'b0;
      @(posedge clk); f_rst_n <= 1'b1;
      while (f_n_ret < len) @(posedge clk);
      @(posedge clk);
      check("falling edge: cycles", 64'(f_ret_at), 64'(int'((len - 1) * 5 + 8 * 5)));
      check("falling edge: no state change after a rising edge", 64'(f_rise_changes), 64'd0);
      check("falling edge: state changes after falling edges", 64'(f_fall_changes > 0), 64'd1);
      for (int k = 0; k < 8; k++) begin
        f_dbg_dmem_addr = 6'(17 - 2*k); #1;
        check($sformatf("falling edge: mem[%0d]", 17 - 2*k), 64'(f_dbg_dmem_data), 64'(360 - 2*k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
