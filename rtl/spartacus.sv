// spartacus: top level of the Spartacus MIPS IV-style core.
//
// Wires the controller to its components: the instruction memory (one
// 32-bit read port), the dual-ported data memory (two 32-bit read and two
// 32-bit write ports), the 32-bit and 64-bit register files (two read ports
// and one write port each, 32 registers built from register components) and
// the 32-bit, 64-bit and vector ALUs. Every instruction takes five clock
// cycles (fetch, decode, execute, memory, writeback), and every element of a
// vector instruction takes five more.
//
// Interface: clk, synchronous active-low rst_n. The user program is written
// into instruction memory through prog_we/prog_addr/prog_data, normally while
// rst_n is low; execution starts at word 0 when rst_n goes high. Debug read
// ports show any data-memory word and any register of either file, and the
// controller's PC, state, loop counter and per-instruction pulses are brought
// out for monitoring. The clock source itself lies outside this module.
// Component set and port counts follow the document; the program-load port
// and the debug ports are this design's choice. BASE_ENABLE and HAS_ALUVEC
// select, at build time, which base instructions exist and whether the
// vector ALU is built; by default everything is. CLK_RISING selects the
// clock edge every register and memory of the core uses: with it cleared the
// whole core runs on the falling edge of clk (the clock is inverted once,
// here, and every component below sees a rising edge of that copy).
module spartacus
  import pg13_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 64,
  parameter int unsigned DMEM_DEPTH = 64,
  parameter int unsigned RF_DEPTH   = 32,
  parameter logic [NUM_BASE-1:0] BASE_ENABLE = '1,  // base instructions built
  parameter bit          HAS_ALUVEC = 1'b1,         // vector ALU built
  parameter bit          CLK_RISING = 1'b1,         // 1: rising edge, 0: falling edge
  localparam int unsigned IAW = (IMEM_DEPTH > 1) ? $clog2(IMEM_DEPTH) : 1,
  localparam int unsigned DAW = (DMEM_DEPTH > 1) ? $clog2(DMEM_DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // program load
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_data,
  // debug read ports
  input  logic [DAW-1:0] dbg_dmem_addr,
  output logic [31:0]    dbg_dmem_data,
  input  logic [4:0]     dbg_rf32_addr,
  output logic [31:0]    dbg_rf32_data,
  input  logic [4:0]     dbg_rf64_addr,
  output logic [63:0]    dbg_rf64_data,
  // monitoring
  output logic [31:0]    pc,
  output state_e         state,
  output logic           loop_en,
  output logic [31:0]    loop_cnt,
  output logic           retire,
  output logic           iteration,
  output logic           branch_taken
);
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
  logic        core_clk;

  assign core_clk = CLK_RISING ? clk : ~clk;

  controller #(.BASE_ENABLE(BASE_ENABLE), .HAS_ALUVEC(HAS_ALUVEC)) u_controller (
    .clk(core_clk), .rst_n,
    .imem_addr, .imem_data,
    .dmem_addr1, .dmem_we1, .dmem_din1, .dmem_dout1,
    .dmem_addr2, .dmem_we2, .dmem_din2, .dmem_dout2,
    .rf32_raddr1, .rf32_rdata1, .rf32_raddr2, .rf32_rdata2,
    .rf32_we, .rf32_waddr, .rf32_wdata,
    .rf64_raddr1, .rf64_rdata1, .rf64_raddr2, .rf64_rdata2,
    .rf64_we, .rf64_waddr, .rf64_wdata,
    .alu32_operation, .alu32_source1, .alu32_source2,
    .alu32_result, .alu32_result_hi, .alu32_zero, .alu32_neg,
    .alu64_operation, .alu64_source1, .alu64_source2, .alu64_shamt,
    .alu64_result, .alu64_result_hi,
    .aluvec_operation, .aluvec_source1, .aluvec_source2, .aluvec_result,
    .pc, .state, .loop_en, .loop_cnt, .retire, .iteration, .branch_taken
  );

  imemory #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk(core_clk), .addr(imem_addr), .data(imem_data),
    .prog_we, .prog_addr, .prog_data
  );

  dmemory #(.DEPTH(DMEM_DEPTH), .WIDTH(32)) u_dmem (
    .clk(core_clk),
    .addr1(dmem_addr1), .we1(dmem_we1), .din1(dmem_din1), .dout1(dmem_dout1),
    .addr2(dmem_addr2), .we2(dmem_we2), .din2(dmem_din2), .dout2(dmem_dout2),
    .dbg_addr(dbg_dmem_addr), .dbg_data(dbg_dmem_data)
  );

  regfile #(.WIDTH(32), .DEPTH(RF_DEPTH)) u_rf32 (
    .clk(core_clk), .rst_n,
    .raddr1(rf32_raddr1[$clog2(RF_DEPTH)-1:0]), .rdata1(rf32_rdata1),
    .raddr2(rf32_raddr2[$clog2(RF_DEPTH)-1:0]), .rdata2(rf32_rdata2),
    .we(rf32_we), .waddr(rf32_waddr[$clog2(RF_DEPTH)-1:0]), .wdata(rf32_wdata),
    .dbg_addr(dbg_rf32_addr[$clog2(RF_DEPTH)-1:0]), .dbg_data(dbg_rf32_data)
  );

  regfile #(.WIDTH(64), .DEPTH(RF_DEPTH)) u_rf64 (
    .clk(core_clk), .rst_n,
    .raddr1(rf64_raddr1[$clog2(RF_DEPTH)-1:0]), .rdata1(rf64_rdata1),
    .raddr2(rf64_raddr2[$clog2(RF_DEPTH)-1:0]), .rdata2(rf64_rdata2),
    .we(rf64_we), .waddr(rf64_waddr[$clog2(RF_DEPTH)-1:0]), .wdata(rf64_wdata),
    .dbg_addr(dbg_rf64_addr[$clog2(RF_DEPTH)-1:0]), .dbg_data(dbg_rf64_data)
  );

  alu32 u_alu32 (
    .operation(alu32_operation), .source1(alu32_source1), .source2(alu32_source2),
    .result(alu32_result), .result_hi(alu32_result_hi), .zero(alu32_zero), .neg(alu32_neg)
  );

  alu64 u_alu64 (
    .operation(alu64_operation), .source1(alu64_source1), .source2(alu64_source2),
    .shamt(alu64_shamt), .result(alu64_result), .result_hi(alu64_result_hi)
  );

  if (HAS_ALUVEC) begin : g_aluvec
    aluvec u_aluvec (
      .operation(aluvec_operation), .source1(aluvec_source1), .source2(aluvec_source2),
      .result(aluvec_result)
    );
  end else begin : g_no_aluvec
    // no vector ALU: its instructions decode as no-ops, so the result is unused
    assign aluvec_result = '0;
  end
endmodule
