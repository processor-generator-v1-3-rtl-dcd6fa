// dmemory: dual-ported data memory of the Spartacus core.
//
// DEPTH words of WIDTH bits with two independent ports, each with a
// combinational read and a write on the rising clock edge while its write
// enable is high, so a vector instruction can read two words and write two
// words per cycle. When both ports write the same word in one cycle, port 2
// wins. A third combinational read port serves observation. Addresses are
// 32-bit word addresses whose low bits select the word. Two read and two
// write ports of 32 bits follow the document, as does the 64-word default
// size of its configuration example; the collision rule, the debug port and
// wrap-around addressing are this design's choice.
module dmemory #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [31:0]      addr1,
  input  logic             we1,
  input  logic [WIDTH-1:0] din1,
  output logic [WIDTH-1:0] dout1,
  input  logic [31:0]      addr2,
  input  logic             we2,
  input  logic [WIDTH-1:0] din2,
  output logic [WIDTH-1:0] dout2,
  input  logic [AW-1:0]    dbg_addr,
  output logic [WIDTH-1:0] dbg_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we1) mem[addr1[AW-1:0]] <= din1;
    if (we2) mem[addr2[AW-1:0]] <= din2;
  end

  assign dout1    = mem[addr1[AW-1:0]];
  assign dout2    = mem[addr2[AW-1:0]];
  assign dbg_data = mem[dbg_addr];

  logic unused_addr;
  assign unused_addr = ^{addr1[31:AW], addr2[31:AW]};
endmodule
