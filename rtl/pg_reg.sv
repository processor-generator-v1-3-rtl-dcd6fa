// pg_reg: the register component of the Spartacus core.
//
// A WIDTH-bit register that loads d on the rising clock edge while en is high
// and clears to zero on an active-low synchronous reset. The register files
// are built from 32 of these, one per architectural register, and the
// controller's 32- and 64-bit registers are of the same kind. The width
// default of 32 matches the 32-bit register component; the enable and the
// synchronous clear are this design's choice.
// Timing: q follows d one clock after en; reset wins over en.
module pg_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
