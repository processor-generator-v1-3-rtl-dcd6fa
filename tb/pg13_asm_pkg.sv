// pg13_asm_pkg: instruction encoders used by the Spartacus testbenches.
//
// Each function builds one 32-bit instruction word from its assembly
// operands, in the operand order of the core's assembly language: OP-layout
// instructions are written "op rd rs rt", SP-layout ones "op rt rs imm",
// memory accesses "op memLoc reg offset", and the vector extensions
// "op dest s1 s2". The test programs used by the testbenches are also here,
// so the controller and top-level testbenches run the same code.
package pg13_asm_pkg;
  import pg13_pkg::*;

  function automatic logic [31:0] op_r(logic [5:0] funct, int rd, int rs, int rt, int sa = 0);
    return {SPECIAL_OP, 5'(rs), 5'(rt), 5'(rd), 5'(sa), funct};
  endfunction

  function automatic logic [31:0] sp_i(logic [5:0] special, int rt, int rs, int imm);
    return {special, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // SW / LW: memLoc is the rs field, reg the rt field
  function automatic logic [31:0] sp_mem(logic [5:0] special, int memloc, int rt, int offset);
    return {special, 5'(memloc), 5'(rt), 16'(offset)};
  endfunction

  function automatic logic [31:0] vecadd32_mem(int dest, int s1, int len);
    return {SP_VECADD32_MEM, 5'(dest), 5'(s1), 16'(len)};
  endfunction

  function automatic logic [31:0] vecadd8_mmx(int dest, int s1, int s2);
    return {SPECIAL_OP, 5'(dest), 5'(s1), 5'(s2), 5'd0, OP_VECADD8_MMX};
  endfunction

  function automatic logic [31:0] vecadd16_hybrid(int dest, int s1, int s2, int len);
    return {SPECIAL_OP, 5'(dest), 5'(s1), 5'(s2), 5'(len), OP_VECADD16_HYBRID};
  endfunction

  typedef logic [31:0] prog_t [64];

  // Program A: preload 64-bit R1..R8 with 13..20 and R9..R16 with 333..340,
  // then one vecadd8_mmx 16 R8 R16 (two 32-bit adds per element, 8 elements).
  function automatic prog_t prog_vector(output int len);
    prog_t p = '{default: '0};
    int n = 0;
    for (int i = 1; i <= 16; i++) p[n++] = sp_i(SP_DADDI, i, i, (i <= 8) ? 12 + i : 324 + i);
    p[n++] = vecadd8_mmx(16, 8, 16);
    len = n;
    return p;
  endfunction

  // Program B: the same result without the extension: same preload, eight
  // DADDs, sixteen moves of the halves into 32-bit registers, sixteen stores.
  function automatic prog_t prog_scalar(output int len);
    prog_t p = '{default: '0};
    int n = 0;
    for (int i = 1; i <= 16; i++) p[n++] = sp_i(SP_DADDI, i, i, (i <= 8) ? 12 + i : 324 + i);
    for (int i = 1; i <= 8; i++)  p[n++] = op_r(OP_DADD, i, i, i + 8);
    for (int j = 1; j <= 8; j++) begin
      p[n++] = sp_i(SP_MVDU, 2*j - 1, j, 0);
      p[n++] = sp_i(SP_MVDL, 2*j,     j, 0);
    end
    for (int k = 1; k <= 16; k++) p[n++] = sp_mem(SP_SW, k, k, 0);
    len = n;
    return p;
  endfunction

  // Program C: 32-bit instructions, branches, loads and stores.
  function automatic prog_t prog_base32(output int len);
    prog_t p = '{default: '0};
    int n = 0;
    p[n++] = sp_i(SP_ADDI, 1, 0, 3);          //  0 R1 = 3
    p[n++] = sp_i(SP_ADDI, 2, 2, 5);          //  1 R2 += 5        (loop body)
    p[n++] = sp_i(SP_ADDI, 1, 1, -1);         //  2 R1 -= 1
    p[n++] = sp_i(SP_BNE,  0, 1, -3);         //  3 BNE R1,R0 -> 1  (rt=R0, rs=R1)
    p[n++] = sp_i(SP_ADDI, 3, 0, 100);        //  4 R3 = 100
    p[n++] = sp_i(SP_ADDI, 4, 0, 7);          //  5 R4 = 7
    p[n++] = op_r(OP_DIV, 0, 3, 4);           //  6 LO=14 HI=2
    p[n++] = op_r(OP_MFHI, 5, 0, 0);          //  7 R5 = 2
    p[n++] = op_r(OP_MFLO, 6, 0, 0);          //  8 R6 = 14
    p[n++] = op_r(OP_ADD, 7, 5, 6);           //  9 R7 = 16
    p[n++] = op_r(OP_AND, 8, 6, 2);           // 10 R8 = 14 & 15 = 14
    p[n++] = sp_i(SP_ANDI, 9, 3, 'h0F0);      // 11 R9 = 0x64 & 0xF0 = 0x60
    p[n++] = sp_mem(SP_SW, 20, 7, 0);         // 12 mem[20] = 16
    p[n++] = sp_mem(SP_SW, 10, 2, 11);        // 13 mem[21] = 15
    p[n++] = sp_mem(SP_LW, 20, 10, 1);        // 14 R10 = mem[21] = 15
    p[n++] = sp_i(SP_BEQ, 2, 10, 1);          // 15 R10==R2 -> skip 16
    p[n++] = sp_i(SP_ADDI, 11, 0, 99);        // 16 (skipped)
    p[n++] = sp_i(SP_BLEZ, 0, 0, 1);          // 17 R0<=0 -> skip 18
    p[n++] = sp_i(SP_ADDI, 11, 11, 1);        // 18 (skipped)
    p[n++] = sp_i(SP_BGTZ, 0, 0, 1);          // 19 not taken
    p[n++] = sp_i(SP_ADDI, 12, 0, -5);        // 20 R12 = -5
    p[n++] = op_r(OP_DIVU, 0, 12, 4);         // 21 LO=613566755 HI=6
    p[n++] = op_r(OP_MFLO, 13, 0, 0);         // 22
    p[n++] = op_r(OP_MFHI, 14, 0, 0);         // 23
    p[n++] = op_r(OP_ADDU, 15, 12, 4);        // 24 R15 = 2
    p[n++] = sp_i(SP_ADDIU, 16, 0, -1);       // 25 R16 = 0xFFFFFFFF
    p[n++] = sp_i(SP_BEQ, 0, 0, 1);           // 26 taken
    p[n++] = sp_i(SP_ADDI, 17, 0, 1);         // 27 (skipped)
    p[n++] = sp_i(SP_BNE, 0, 0, 1);           // 28 not taken
    p[n++] = sp_i(SP_ADDI, 17, 17, 2);        // 29 R17 = 2
    len = n;
    return p;
  endfunction

  // Program D: 64-bit instructions, moves and the vector extensions.
  function automatic prog_t prog_base64(output int len);
    prog_t p = '{default: '0};
    int n = 0;
    p[n++] = sp_i(SP_DADDI, 1, 0, -3);        //  0 R1 = -3
    p[n++] = sp_i(SP_DADDIU, 2, 0, 1000);     //  1 R2 = 1000
    p[n++] = op_r(OP_DMULT, 0, 1, 2);         //  2 HI:LO = -3000
    p[n++] = op_r(OP_MFDHI, 3, 0, 0);         //  3 R3 = -1
    p[n++] = op_r(OP_MFDLO, 4, 0, 0);         //  4 R4 = -3000
    p[n++] = op_r(OP_DDIV, 0, 4, 2);          //  5 LO = -3, HI = 0
    p[n++] = op_r(OP_MFDLO, 5, 0, 0);         //  6 R5 = -3
    p[n++] = op_r(OP_DSLL, 6, 0, 2, 4);       //  7 R6 = 16000
    p[n++] = sp_i(SP_DADDI, 7, 0, 2);         //  8 R7 = 2
    p[n++] = op_r(OP_DSRAV, 8, 7, 1);         //  9 R8 = -3 >>> 2 = -1
    p[n++] = op_r(OP_DSRLV, 9, 7, 1);         // 10 R9 = 0x3FFF...FF
    p[n++] = op_r(OP_DSUB, 10, 2, 7);         // 11 R10 = 998
    p[n++] = op_r(OP_DSRL, 11, 0, 2, 3);      // 12 R11 = 125
    p[n++] = op_r(OP_DSRA, 12, 0, 1, 1);      // 13 R12 = -2
    p[n++] = op_r(OP_DSLLV, 13, 7, 2);        // 14 R13 = 4000
    p[n++] = op_r(OP_DADDU, 14, 2, 7);        // 15 R14 = 1002
    p[n++] = op_r(OP_DSUBU, 15, 7, 2);        // 16 R15 = -998
    p[n++] = op_r(OP_DMULTU, 0, 1, 7);        // 17 HI:LO = (2^64-3)*2
    p[n++] = op_r(OP_MFDHI, 16, 0, 0);        // 18 R16 = 1
    p[n++] = op_r(OP_DDIVU, 0, 2, 7);         // 19 LO = 500
    p[n++] = op_r(OP_MFDLO, 17, 0, 0);        // 20 R17 = 500
    p[n++] = sp_i(SP_MVDU, 1, 1, 0);          // 21 rf32 R1 = 0xFFFFFFFF
    p[n++] = sp_i(SP_MVDL, 2, 2, 0);          // 22 rf32 R2 = 1000
    p[n++] = op_r(OP_DADD, 18, 2, 7);         // 23 R18 = 1002
    // memory operands for vecadd32_mem
    p[n++] = sp_i(SP_ADDI, 22, 0, 1);         // 24
    p[n++] = sp_mem(SP_SW, 12, 22, 0);        // 25 mem[12] = 1
    p[n++] = sp_i(SP_ADDI, 22, 0, 2);         // 26
    p[n++] = sp_mem(SP_SW, 13, 22, 0);        // 27 mem[13] = 2
    p[n++] = sp_i(SP_ADDI, 22, 0, 10);        // 28
    p[n++] = sp_mem(SP_SW, 24, 22, 0);        // 29 mem[24] = 10
    p[n++] = sp_i(SP_ADDI, 22, 0, 20);        // 30
    p[n++] = sp_mem(SP_SW, 25, 22, 0);        // 31 mem[25] = 20
    p[n++] = vecadd32_mem(13, 25, 2);         // 32 mem[13]=22, mem[12]=11
    // 64-bit operands for vecadd16_hybrid and pavgb
    p[n++] = sp_i(SP_DADDI, 20, 0, 'h7FFF);   // 33 R20 = 0x7FFF
    p[n++] = sp_i(SP_DADDI, 21, 0, -1);       // 34 R21 = all ones
    p[n++] = sp_i(SP_DADDI, 22, 0, 1);        // 35 R22 = 1
    p[n++] = sp_i(SP_DADDI, 23, 0, 1);        // 36 R23 = 1
    p[n++] = vecadd16_hybrid(30, 21, 23, 2);  // 37 mem[30..31], mem[28..29]
    p[n++] = op_r(OP_PAVGB_MMX, 24, 21, 20);  // 38 R24 = 0x80808080_8080BFFF
    len = n;
    return p;
  endfunction
endpackage
