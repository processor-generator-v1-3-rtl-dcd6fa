// tb_controller: self-checking test of the controller on its own.
// The instruction memory, data memory and both register files are plain
// arrays in the testbench (combinational reads, writes at the clock edge);
// the three ALUs are the real ones. Runs the vecadd8_mmx program and the
// 32- and 64-bit instruction programs, checks results, checks that the
// state sequence is always FETCH, DECODE, EXECUTE, MEMORY, WRITEBACK and
// that each instruction (and each vector element) takes five cycles.
module tb_controller;
  import pg13_pkg::*;
  import pg13_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] imem_addr, imem_data;
  logic [31:0] dmem_addr1, dmem_din1, dmem_dout1, dmem_addr2, dmem_din2, dmem_dout2;
  logic        dmem_we1, dmem_we2;
  logic [4:0]  rf32_raddr1, rf32_raddr2, rf32_waddr, rf64_raddr1, rf64_raddr2, rf64_waddr;
  logic [31:0] rf32_rdata1, rf32_rdata2, rf32_wdata;
  logic [63:0] rf64_rdata1, rf64_rdata2, rf64_wdata;
  logic        rf32_we, rf64_we;
  logic [5:0]  alu32_operation, alu64_operation, aluvec_operation, alu64_shamt;
  logic [31:0] alu32_source1, alu32_source2, alu32_result, alu32_result_hi;
  logic        alu32_zero, alu32_neg;
  logic [63:0] alu64_source1, alu64_source2, alu64_result, alu64_result_hi;
  logic [63:0] aluvec_source1, aluvec_source2, aluvec_result;
  logic [31:0] pc, loop_cnt;
  state_e      state;
  logic        loop_en, retire, iteration, branch_taken;

  controller dut (.*);
  alu32  u_alu32 (.operation(alu32_operation), .source1(alu32_source1), .source2(alu32_source2),
                  .result(alu32_result), .result_hi(alu32_result_hi), .zero(alu32_zero), .neg(alu32_neg));
  alu64  u_alu64 (.operation(alu64_operation), .source1(alu64_source1), .source2(alu64_source2),
                  .shamt(alu64_shamt), .result(alu64_result), .result_hi(alu64_result_hi));
  aluvec u_aluvec (.operation(aluvec_operation), .source1(aluvec_source1), .source2(aluvec_source2),
                   .result(aluvec_result));

  // component models
  logic [31:0] imem [64];
  logic [31:0] dmem [64];
  logic [31:0] rf32 [32];
  logic [63:0] rf64 [32];
  assign imem_data   = imem[imem_addr[5:0]];
  assign dmem_dout1  = dmem[dmem_addr1[5:0]];
  assign dmem_dout2  = dmem[dmem_addr2[5:0]];
  assign rf32_rdata1 = rf32[rf32_raddr1];
  assign rf32_rdata2 = rf32[rf32_raddr2];
  assign rf64_rdata1 = rf64[rf64_raddr1];
  assign rf64_rdata2 = rf64[rf64_raddr2];
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) begin rf32[i] <= '0; rf64[i] <= '0; end
    end else begin
      if (rf32_we) rf32[rf32_waddr] <= rf32_wdata;
      if (rf64_we) rf64[rf64_waddr] <= rf64_wdata;
    end
    if (dmem_we1) dmem[dmem_addr1[5:0]] <= dmem_din1;
    if (dmem_we2) dmem[dmem_addr2[5:0]] <= dmem_din2;
  end

  always #10 clk = ~clk;

  int checks = 0, failures = 0, n_ret = 0, n_cycles = 0, ret_at = 0;
  state_e prev;
  always @(posedge clk) begin
    if (!rst_n) begin
      n_ret <= 0; n_cycles <= 0; prev <= ST_WRITEBACK;
    end else begin
      n_cycles <= n_cycles + 1;
      if (retire) begin n_ret <= n_ret + 1; ret_at <= n_cycles + 1; end
      prev <= state;
      checks++;
      if (state != state_e'((prev == ST_WRITEBACK) ? ST_FETCH : state_e'(3'(prev) + 3'd1))) begin
        failures++; $display("FAIL state %s after %s", state.name(), prev.name());
      end
    end
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic run(prog_t p, int n_instr);
    @(negedge clk); rst_n = 1'b0;
    for (int i = 0; i < 64; i++) imem[i] = p[i];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (n_ret < n_instr) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog_t p;
    int len;
    automatic logic [31:0] exp32 [18] = '{0, 0, 15, 100, 7, 2, 14, 16, 14, 'h60, 15, 0,
                                32'hFFFF_FFFB, 613566755, 6, 2, 32'hFFFF_FFFF, 2};

    p = prog_vector(len);
    run(p, len);
    check("A cycles", 64'(ret_at), 64'(16 * 5 + 8 * 5));
    check("A pc", 64'(pc), 64'(len));
    for (int k = 0; k < 8; k++) begin
      check("A hi", 64'(dmem[16 - 2*k]), 0);
      check("A lo", 64'(dmem[17 - 2*k]), 64'(360 - 2*k));
    end

    p = prog_base32(len);
    run(p, 33);
    check("C cycles", 64'(ret_at), 64'(33 * 5));
    for (int i = 1; i < 18; i++) check($sformatf("C R%0d", i), 64'(rf32[i]), 64'(exp32[i]));
    check("C mem[20]", 64'(dmem[20]), 16);
    check("C mem[21]", 64'(dmem[21]), 15);

    p = prog_base64(len);
    run(p, len);
    check("D cycles", 64'(ret_at), 64'(int'((len - 2) * 5 + 20)));
    check("D R4", rf64[4], -64'sd3000);
    check("D R9", rf64[9], 64'h3FFF_FFFF_FFFF_FFFF);
    check("D R15", rf64[15], -64'sd998);
    check("D R16", rf64[16], 64'd1);
    check("D R17", rf64[17], 64'd500);
    check("D R24", rf64[24], 64'h8080_8080_8080_BFFF);
    check("D mvdu", 64'(rf32[1]), 64'hFFFF_FFFF);
    check("D mem[12]", 64'(dmem[12]), 11);
    check("D mem[13]", 64'(dmem[13]), 22);
    check("D mem[30]", 64'(dmem[30]), 64'hFFFF_FFFF);
    check("D mem[31]", 64'(dmem[31]), 64'hFFFF_0000);
    check("D mem[29]", 64'(dmem[29]), 64'h8000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
