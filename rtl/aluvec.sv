// aluvec: vector ALU of the Spartacus core.
//
// Purely combinational. Treats its two 64-bit sources as packed lanes and
// works on all lanes at once. OP_VADD32 adds the two 32-bit halves
// independently (bits 63:32 and 31:0), which lets a vector instruction
// finish two 32-bit additions per iteration; this operation is the custom
// ALU extension of the document. OP_VADD16 (four 16-bit adds) and OP_PAVGB
// (eight byte averages rounded up, (a+b+1)>>1) are the lane operations the
// document's other example extensions name; their exact definitions and all
// operation codes are this design's choice. Lane sums wrap.
module aluvec
  import pg13_pkg::*;
(
  input  logic [5:0]  operation,
  input  logic [63:0] source1,
  input  logic [63:0] source2,
  output logic [63:0] result
);
  logic [8:0] avg [8];

  always_comb begin
    for (int i = 0; i < 8; i++)
      avg[i] = {1'b0, source1[8*i +: 8]} + {1'b0, source2[8*i +: 8]} + 9'd1;
  end

  always_comb begin
    result = '0;
    unique case (operation)
      OP_VADD32: begin
        result[63:32] = source1[63:32] + source2[63:32];
        result[31:0]  = source1[31:0]  + source2[31:0];
      end
      OP_VADD16: begin
        for (int i = 0; i < 4; i++)
          result[16*i +: 16] = source1[16*i +: 16] + source2[16*i +: 16];
      end
      OP_PAVGB: begin
        for (int i = 0; i < 8; i++)
          result[8*i +: 8] = avg[i][8:1];
      end
      default: ;
    endcase
  end
endmodule
