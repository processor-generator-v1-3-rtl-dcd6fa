// pg13_pkg: shared types and constants of the Spartacus core.
//
// Holds the instruction field layout (the OP and SP layouts), the function
// codes of the base instruction set, the opcodes reserved for the vector
// extensions, the ALU operation codes and the controller state type.
// The base instruction codes are the ones of the published instruction table
// (they coincide with MIPS IV). The codes of SP_MVDU, SP_MVDL, the two vector
// extensions and the ALU operations that have no instruction code of their own
// are this design's choice.
package pg13_pkg;

  // ---------------------------------------------------------------- fields
  // OP layout: special(31:26)=000000 rs(25:21) rt(20:16) rd(15:11) sa(10:6) opcode(5:0)
  // SP layout: special(31:26) rs(25:21) rt(20:16) immediate/offset(15:0)
  typedef struct packed {
    logic [5:0]  special;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  sa;
    logic [5:0]  opcode;
  } ir_op_t;

  localparam logic [5:0] SPECIAL_OP = 6'b000000;

  // ------------------------------------------------ OP layout (opcode field)
  localparam logic [5:0] OP_ADD    = 6'b100000;
  localparam logic [5:0] OP_ADDU   = 6'b100001;
  localparam logic [5:0] OP_AND    = 6'b100100;
  localparam logic [5:0] OP_DADD   = 6'b101100;
  localparam logic [5:0] OP_DADDU  = 6'b101101;
  localparam logic [5:0] OP_DDIV   = 6'b011110;
  localparam logic [5:0] OP_DDIVU  = 6'b011111;
  localparam logic [5:0] OP_DIV    = 6'b011010;
  localparam logic [5:0] OP_DIVU   = 6'b011011;
  localparam logic [5:0] OP_DMULT  = 6'b011100;
  localparam logic [5:0] OP_DMULTU = 6'b011101;
  localparam logic [5:0] OP_DSLL   = 6'b111000;
  localparam logic [5:0] OP_DSLLV  = 6'b010100;
  localparam logic [5:0] OP_DSRA   = 6'b111011;
  localparam logic [5:0] OP_DSRAV  = 6'b010111;
  localparam logic [5:0] OP_DSRL   = 6'b111010;
  localparam logic [5:0] OP_DSRLV  = 6'b010110;
  localparam logic [5:0] OP_DSUB   = 6'b101110;
  localparam logic [5:0] OP_DSUBU  = 6'b101111;
  localparam logic [5:0] OP_MFHI   = 6'b010000;
  localparam logic [5:0] OP_MFLO   = 6'b010010;
  localparam logic [5:0] OP_MFDHI  = 6'b010001;
  localparam logic [5:0] OP_MFDLO  = 6'b010011;
  // Vector extension in the OP layout: vecadd8_mmx dest(rs) s1(rt) s2(rd)
  localparam logic [5:0] OP_VECADD8_MMX = 6'b111111;
  // vecadd16_hybrid dest(rs) s1(rt) s2(rd), vector length in the sa field
  localparam logic [5:0] OP_VECADD16_HYBRID = 6'b111110;
  // pavgb rd, rs, rt on the 64-bit (MMX) register file
  localparam logic [5:0] OP_PAVGB_MMX = 6'b111101;

  // --------------------------------------------- SP layout (special field)
  localparam logic [5:0] SP_ADDI   = 6'b001000;
  localparam logic [5:0] SP_ADDIU  = 6'b001001;
  localparam logic [5:0] SP_ANDI   = 6'b001100;
  localparam logic [5:0] SP_BEQ    = 6'b000100;
  localparam logic [5:0] SP_BGTZ   = 6'b000111;
  localparam logic [5:0] SP_BLEZ   = 6'b000110;
  localparam logic [5:0] SP_BNE    = 6'b000101;
  localparam logic [5:0] SP_DADDI  = 6'b011000;
  localparam logic [5:0] SP_DADDIU = 6'b011001;
  localparam logic [5:0] SP_LW     = 6'b100011;
  localparam logic [5:0] SP_SW     = 6'b101011;
  // Moves between the register files (used by the non-vector program)
  localparam logic [5:0] SP_MVDU   = 6'b110000;  // rf32[rt] <= rf64[rs](63:32)
  localparam logic [5:0] SP_MVDL   = 6'b110001;  // rf32[rt] <= rf64[rs](31:0)
  // Vector extension in the SP layout: vecadd32_mem dest(rs) s1(rt) s2(imm)
  localparam logic [5:0] SP_VECADD32_MEM = 6'b111111;

  // ------------------------------------------------------- ALU operations
  // ALU32 and ALU64 are driven with the instruction's own function code;
  // ALU_SUB (compare for branches) has no instruction of its own.
  localparam logic [5:0] ALU_SUB   = 6'b100010;
  // Vector ALU operations
  localparam logic [5:0] OP_VADD32 = 6'b000001;  // two 32-bit adds
  localparam logic [5:0] OP_VADD16 = 6'b000010;  // four 16-bit adds
  localparam logic [5:0] OP_PAVGB  = 6'b000011;  // eight rounded byte averages

  // ------------------------------------------- base instruction selection
  // One bit per base instruction in a BASE_ENABLE mask; a cleared bit turns
  // that instruction into a no-op. Order: the base instruction table, then
  // the two register-file moves.
  typedef enum logic [5:0] {
    B_ADD, B_ADDU, B_ADDI, B_ADDIU, B_AND, B_ANDI, B_BEQ, B_BGTZ, B_BLEZ, B_BNE,
    B_DADD, B_DADDU, B_DADDI, B_DADDIU, B_DDIV, B_DDIVU, B_DIV, B_DIVU,
    B_DMULT, B_DMULTU, B_DSLL, B_DSLLV, B_DSRA, B_DSRAV, B_DSRL, B_DSRLV,
    B_DSUB, B_DSUBU, B_LW, B_SW, B_MFHI, B_MFLO, B_MFDHI, B_MFDLO,
    B_MVDU, B_MVDL, B_NONE
  } base_instr_e;
  localparam int unsigned NUM_BASE = 36;

  // ------------------------------------------------------ controller FSM
  typedef enum logic [2:0] {
    ST_FETCH     = 3'd0,
    ST_DECODE    = 3'd1,
    ST_EXECUTE   = 3'd2,
    ST_MEMORY    = 3'd3,
    ST_WRITEBACK = 3'd4
  } state_e;

endpackage
