// regfile: register file of the Spartacus core (32- and 64-bit instances).
//
// DEPTH registers of WIDTH bits, each a pg_reg component, with two
// combinational read ports, one write port and one extra combinational
// read port for observation (debug). A write takes effect at the rising edge
// while we is high; a read in the same cycle returns the old value.
// Two read ports, one write port, 32 registers and the 32-/64-bit widths
// follow the description of the core; the debug port, the reset to zero and
// the absence of a hard-wired zero register are this design's choice.
module regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1,
  input  logic [AW-1:0]    raddr2,
  output logic [WIDTH-1:0] rdata2,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    dbg_addr,
  output logic [WIDTH-1:0] dbg_data
);
  logic [WIDTH-1:0] q [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_reg
    pg_reg #(.WIDTH(WIDTH)) u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (we && (waddr == AW'(i))),
      .d    (wdata),
      .q    (q[i])
    );
  end

  assign rdata1   = q[raddr1];
  assign rdata2   = q[raddr2];
  assign dbg_data = q[dbg_addr];
endmodule
