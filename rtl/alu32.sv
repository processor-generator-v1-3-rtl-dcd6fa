// alu32: 32-bit ALU of the Spartacus core.
//
// Purely combinational. The operation input carries the function code of the
// instruction being executed (OP_ADD, OP_ADDU, OP_AND, OP_DIV, OP_DIVU) or
// ALU_SUB, which the controller uses to compare for branches. result is the
// sum, AND, difference or quotient; result_hi is the remainder of a divide
// (the value the HI register takes) and zero otherwise. zero and neg describe
// result. The operation set follows the 32-bit instructions of the base
// instruction set. The signed/unsigned add pair both wrap (no overflow trap),
// and division by zero gives quotient all-ones and remainder = dividend; both
// are this design's choice.
module alu32
  import pg13_pkg::*;
(
  input  logic [5:0]  operation,
  input  logic [31:0] source1,
  input  logic [31:0] source2,
  output logic [31:0] result,
  output logic [31:0] result_hi,
  output logic        zero,
  output logic        neg
);
  always_comb begin
    result    = '0;
    result_hi = '0;
    unique case (operation)
      OP_ADD, OP_ADDU: result = source1 + source2;
      OP_AND:          result = source1 & source2;
      ALU_SUB:         result = source1 - source2;
      OP_DIV: begin
        if (source2 == 0) begin
          result = '1; result_hi = source1;
        end else begin
          result    = $signed(source1) / $signed(source2);
          result_hi = $signed(source1) % $signed(source2);
        end
      end
      OP_DIVU: begin
        if (source2 == 0) begin
          result = '1; result_hi = source1;
        end else begin
          result    = source1 / source2;
          result_hi = source1 % source2;
        end
      end
      default: ;
    endcase
  end

  assign zero = (result == '0);
  assign neg  = result[31];
endmodule
