// alu64: 64-bit ALU of the Spartacus core.
//
// Purely combinational. The operation input carries the function code of the
// 64-bit instruction: DADD/DADDU, DSUB/DSUBU, DMULT/DMULTU, DDIV/DDIVU and
// the six shifts. For the shifts source2 is the value shifted and the amount
// is shamt (fixed forms) or source1(5:0) (variable forms). result is the sum,
// difference, shifted value, low product word or quotient; result_hi is the
// high product word or the remainder (the 64-bit HI register's new value).
// The operation set follows the 64-bit instructions of the base instruction
// set. Wrapping adds (no overflow trap) and the divide-by-zero result
// (quotient all-ones, remainder = dividend) are this design's choice.
module alu64
  import pg13_pkg::*;
(
  input  logic [5:0]  operation,
  input  logic [63:0] source1,
  input  logic [63:0] source2,
  input  logic [5:0]  shamt,
  output logic [63:0] result,
  output logic [63:0] result_hi
);
  logic [127:0] prod_s, prod_u;
  assign prod_s = $signed({{64{source1[63]}}, source1}) * $signed({{64{source2[63]}}, source2});
  assign prod_u = {64'd0, source1} * {64'd0, source2};

  always_comb begin
    result    = '0;
    result_hi = '0;
    unique case (operation)
      OP_DADD, OP_DADDU: result = source1 + source2;
      OP_DSUB, OP_DSUBU: result = source1 - source2;
      OP_DMULT:  {result_hi, result} = prod_s;
      OP_DMULTU: {result_hi, result} = prod_u;
      OP_DDIV: begin
        if (source2 == 0) begin
          result = '1; result_hi = source1;
        end else begin
          result    = $signed(source1) / $signed(source2);
          result_hi = $signed(source1) % $signed(source2);
        end
      end
      OP_DDIVU: begin
        if (source2 == 0) begin
          result = '1; result_hi = source1;
        end else begin
          result    = source1 / source2;
          result_hi = source1 % source2;
        end
      end
      OP_DSLL:  result = source2 << shamt;
      OP_DSLLV: result = source2 << source1[5:0];
      OP_DSRL:  result = source2 >> shamt;
      OP_DSRLV: result = source2 >> source1[5:0];
      OP_DSRA:  result = $signed(source2) >>> shamt;
      OP_DSRAV: result = $signed(source2) >>> source1[5:0];
      default: ;
    endcase
  end
endmodule
