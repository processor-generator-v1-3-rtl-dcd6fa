// imemory: instruction memory of the Spartacus core.
//
// DEPTH words of 32 bits. The controller reads one instruction per cycle
// through a combinational read port addressed by the word-addressed program
// counter (the low address bits select the word, so addresses wrap). A write
// port loads the user program, one word per rising clock edge while prog_we
// is high. The memory is not reset; it holds zero words after power-up in
// simulation only if they are loaded. The 32-bit word follows the document;
// its depth is configurable there and 64 words is this design's default, as
// are the program-load port and the word addressing.
module imemory #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   data,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [31:0]   prog_data
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign data = mem[addr[AW-1:0]];

  // Upper PC bits are ignored by design: the memory wraps.
  logic unused_addr;
  assign unused_addr = ^addr[31:AW];
endmodule
