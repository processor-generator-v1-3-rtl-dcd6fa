// controller: instruction sequencer and datapath registers of the Spartacus core.
//
// The controller runs each instruction through five states in turn, one
// clock each: FETCH (load the instruction fields from instruction memory),
// DECODE (read both register files, and for vecadd32_mem both data-memory
// ports, into operand registers), EXECUTE (drive the three ALUs and latch
// their results and the branch decision), MEMORY (load or store through the
// data-memory ports) and WRITEBACK (write a register file or HI/LO, update the
// program counter). One instruction therefore takes five cycles and
// instructions do not overlap. The state register is updated in a clocked
// process and the next state is chosen in a combinational one.
//
// Vector instructions repeat the five states once per element. A loop count
// is loaded in the first DECODE (the immediate for vecadd32_mem, 8 for
// vecadd8_mmx, the sa field for vecadd16_hybrid); each WRITEBACK decrements
// the operand fields (dest by 1 or 2, sources by 1) and, while elements
// remain, returns to FETCH without advancing the PC or reloading the fields.
// A count of zero runs one element.
//
// Instruction memory and the data memory are word addressed; the PC counts
// words and a taken branch goes to PC+1+offset. LW/SW use the rs field itself
// as the base word address ("memLoc" operand) plus the sign-extended offset.
//
// From the document: the five stages, the two register files, the OP and SP
// layouts, the base function codes, HI/LO registers of both widths, the loop
// mechanism and the stage-by-stage behaviour of vecadd32_mem and vecadd8_mmx.
// This design's own choices: that stages do not overlap, the branch target
// and memLoc addressing rules, the codes of MVDU/MVDL and the extensions,
// how vecadd16_hybrid and pavgb are defined, no exceptions or traps, the
// synchronous active-low reset, and unknown codes acting as no-ops.
//
// Build-time configuration, after the generator's options to include only
// chosen base instructions and components: BASE_ENABLE has one bit per base
// instruction (index base_instr_e) and HAS_ALUVEC says whether the vector
// ALU exists. An instruction left out decodes as a five-cycle no-op. The
// defaults build everything.
module controller
  import pg13_pkg::*;
#(
  // which base instructions are built (bit index = base_instr_e)
  parameter logic [NUM_BASE-1:0] BASE_ENABLE = '1,
  // vector ALU present: enables vecadd8_mmx, vecadd16_hybrid and pavgb
  parameter bit HAS_ALUVEC = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_data,
  // data memory, two ports
  output logic [31:0] dmem_addr1,
  output logic        dmem_we1,
  output logic [31:0] dmem_din1,
  input  logic [31:0] dmem_dout1,
  output logic [31:0] dmem_addr2,
  output logic        dmem_we2,
  output logic [31:0] dmem_din2,
  input  logic [31:0] dmem_dout2,
  // 32-bit register file
  output logic [4:0]  rf32_raddr1,
  input  logic [31:0] rf32_rdata1,
  output logic [4:0]  rf32_raddr2,
  input  logic [31:0] rf32_rdata2,
  output logic        rf32_we,
  output logic [4:0]  rf32_waddr,
  output logic [31:0] rf32_wdata,
  // 64-bit register file
  output logic [4:0]  rf64_raddr1,
  input  logic [63:0] rf64_rdata1,
  output logic [4:0]  rf64_raddr2,
  input  logic [63:0] rf64_rdata2,
  output logic        rf64_we,
  output logic [4:0]  rf64_waddr,
  output logic [63:0] rf64_wdata,
  // ALU32
  output logic [5:0]  alu32_operation,
  output logic [31:0] alu32_source1,
  output logic [31:0] alu32_source2,
  input  logic [31:0] alu32_result,
  input  logic [31:0] alu32_result_hi,
  input  logic        alu32_zero,
  input  logic        alu32_neg,
  // ALU64
  output logic [5:0]  alu64_operation,
  output logic [63:0] alu64_source1,
  output logic [63:0] alu64_source2,
  output logic [5:0]  alu64_shamt,
  input  logic [63:0] alu64_result,
  input  logic [63:0] alu64_result_hi,
  // vector ALU
  output logic [5:0]  aluvec_operation,
  output logic [63:0] aluvec_source1,
  output logic [63:0] aluvec_source2,
  input  logic [63:0] aluvec_result,
  // observation
  output logic [31:0] pc,
  output state_e      state,
  output logic        loop_en,
  output logic [31:0] loop_cnt,
  output logic        retire,      // one pulse per completed instruction
  output logic        iteration,   // one pulse per completed vector element
  output logic        branch_taken // pulse: a taken branch updates the PC
);

  // ------------------------------------------------------------ registers
  state_e      state_q, state_d;
  logic [31:0] pc_q;
  logic [5:0]  special_q, funct_q;
  logic [4:0]  rs_q, rt_q, rd_q, sa_q;
  logic [15:0] imm_q;
  logic [31:0] a32_q, b32_q, m1_q, m2_q;
  logic [63:0] a64_q, b64_q;
  logic [31:0] r32_q, r32hi_q, ld_q;
  logic [63:0] r64_q, r64hi_q, rv_q;
  logic        taken_q;
  logic [31:0] hi32_q, lo32_q;
  logic [63:0] hi64_q, lo64_q;
  logic        loop_en_q;
  logic [31:0] loop_cnt_q;

  // ------------------------------------------------------------- decoding
  logic is_op;
  logic i_alu32, i_div32, i_mfhi, i_mflo;
  logic i_alu64, i_muldiv64, i_mfdhi, i_mfdlo;
  logic i_addi32, i_andi, i_daddi, i_branch, i_lw, i_sw, i_mvdu, i_mvdl;
  logic i_vec32mem, i_vec8mmx, i_vec16hyb, i_pavgb, i_loop, i_mmx_pair;
  base_instr_e base_idx;
  logic        op_en;       // the instruction is part of this build

  always_comb begin
    is_op      = (special_q == SPECIAL_OP);
    i_alu32    = is_op && (funct_q inside {OP_ADD, OP_ADDU, OP_AND});
    i_div32    = is_op && (funct_q inside {OP_DIV, OP_DIVU});
    i_mfhi     = is_op && (funct_q == OP_MFHI);
    i_mflo     = is_op && (funct_q == OP_MFLO);
    i_alu64    = is_op && (funct_q inside {OP_DADD, OP_DADDU, OP_DSUB, OP_DSUBU,
                                           OP_DSLL, OP_DSLLV, OP_DSRA, OP_DSRAV,
                                           OP_DSRL, OP_DSRLV});
    i_muldiv64 = is_op && (funct_q inside {OP_DMULT, OP_DMULTU, OP_DDIV, OP_DDIVU});
    i_mfdhi    = is_op && (funct_q == OP_MFDHI);
    i_mfdlo    = is_op && (funct_q == OP_MFDLO);
    i_vec8mmx  = is_op && (funct_q == OP_VECADD8_MMX);
    i_vec16hyb = is_op && (funct_q == OP_VECADD16_HYBRID);
    i_pavgb    = is_op && (funct_q == OP_PAVGB_MMX);
    i_addi32   = (special_q inside {SP_ADDI, SP_ADDIU, SP_ANDI});
    i_andi     = (special_q == SP_ANDI);
    i_daddi    = (special_q inside {SP_DADDI, SP_DADDIU});
    i_branch   = (special_q inside {SP_BEQ, SP_BNE, SP_BGTZ, SP_BLEZ});
    i_lw       = (special_q == SP_LW);
    i_sw       = (special_q == SP_SW);
    i_mvdu     = (special_q == SP_MVDU);
    i_mvdl     = (special_q == SP_MVDL);
    i_vec32mem = (special_q == SP_VECADD32_MEM);
    i_loop     = i_vec32mem || i_vec8mmx || i_vec16hyb;
    // instructions left out of the build decode as no-ops
    if (!op_en) begin
      {i_alu32, i_div32, i_mfhi, i_mflo, i_alu64, i_muldiv64, i_mfdhi, i_mfdlo} = '0;
      {i_vec8mmx, i_vec16hyb, i_pavgb, i_addi32, i_andi, i_daddi, i_branch} = '0;
      {i_lw, i_sw, i_mvdu, i_mvdl, i_vec32mem, i_loop} = '0;
    end
    i_mmx_pair = i_vec8mmx || i_vec16hyb;   // sources in rt and rd, result to mem
  end

  // ----------------------------------------- build-time instruction set
  always_comb begin
    base_idx = B_NONE;
    if (special_q == SPECIAL_OP) begin
      unique case (funct_q)
        OP_ADD:    base_idx = B_ADD;
        OP_ADDU:   base_idx = B_ADDU;
        OP_AND:    base_idx = B_AND;
        OP_DADD:   base_idx = B_DADD;
        OP_DADDU:  base_idx = B_DADDU;
        OP_DDIV:   base_idx = B_DDIV;
        OP_DDIVU:  base_idx = B_DDIVU;
        OP_DIV:    base_idx = B_DIV;
        OP_DIVU:   base_idx = B_DIVU;
        OP_DMULT:  base_idx = B_DMULT;
        OP_DMULTU: base_idx = B_DMULTU;
        OP_DSLL:   base_idx = B_DSLL;
        OP_DSLLV:  base_idx = B_DSLLV;
        OP_DSRA:   base_idx = B_DSRA;
        OP_DSRAV:  base_idx = B_DSRAV;
        OP_DSRL:   base_idx = B_DSRL;
        OP_DSRLV:  base_idx = B_DSRLV;
        OP_DSUB:   base_idx = B_DSUB;
        OP_DSUBU:  base_idx = B_DSUBU;
        OP_MFHI:   base_idx = B_MFHI;
        OP_MFLO:   base_idx = B_MFLO;
        OP_MFDHI:  base_idx = B_MFDHI;
        OP_MFDLO:  base_idx = B_MFDLO;
        default:   base_idx = B_NONE;
      endcase
    end else begin
      unique case (special_q)
        SP_ADDI:   base_idx = B_ADDI;
        SP_ADDIU:  base_idx = B_ADDIU;
        SP_ANDI:   base_idx = B_ANDI;
        SP_BEQ:    base_idx = B_BEQ;
        SP_BGTZ:   base_idx = B_BGTZ;
        SP_BLEZ:   base_idx = B_BLEZ;
        SP_BNE:    base_idx = B_BNE;
        SP_DADDI:  base_idx = B_DADDI;
        SP_DADDIU: base_idx = B_DADDIU;
        SP_LW:     base_idx = B_LW;
        SP_SW:     base_idx = B_SW;
        SP_MVDU:   base_idx = B_MVDU;
        SP_MVDL:   base_idx = B_MVDL;
        default:   base_idx = B_NONE;
      endcase
    end
    if (base_idx != B_NONE)
      op_en = BASE_ENABLE[base_idx];
    else if ((special_q == SPECIAL_OP) &&
             (funct_q inside {OP_VECADD8_MMX, OP_VECADD16_HYBRID, OP_PAVGB_MMX}))
      op_en = HAS_ALUVEC;
    else
      op_en = 1'b1;   // vecadd32_mem (ALU32 only) and codes without meaning
  end

  logic [31:0] imm_sext, imm_zext, ea;
  logic [63:0] imm_sext64;
  assign imm_sext   = {{16{imm_q[15]}}, imm_q};
  assign imm_zext   = {16'd0, imm_q};
  assign imm_sext64 = {{48{imm_q[15]}}, imm_q};
  assign ea         = {27'd0, rs_q} + imm_sext;

  // ------------------------------------------------------- next state
  logic loop_more;
  assign loop_more = loop_en_q && (loop_cnt_q > 32'd1);

  always_comb begin
    unique case (state_q)
      ST_FETCH:     state_d = ST_DECODE;
      ST_DECODE:    state_d = ST_EXECUTE;
      ST_EXECUTE:   state_d = ST_MEMORY;
      ST_MEMORY:    state_d = ST_WRITEBACK;
      ST_WRITEBACK: state_d = ST_FETCH;
      default:      state_d = ST_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= ST_FETCH;
    else        state_q <= state_d;
  end

  // -------------------------------------------- register-file read ports
  assign rf32_raddr1 = rs_q;
  assign rf32_raddr2 = rt_q;
  assign rf64_raddr1 = i_mmx_pair ? rt_q : rs_q;
  assign rf64_raddr2 = i_mmx_pair ? rd_q : rt_q;

  // ------------------------------------------------------------ ALU drive
  always_comb begin
    alu32_operation = OP_ADD;
    if (i_alu32 || i_div32) alu32_operation = funct_q;
    else if (i_andi)        alu32_operation = OP_AND;
    else if (i_branch)      alu32_operation = ALU_SUB;
    alu32_source1 = i_vec32mem ? m1_q : a32_q;
    if (i_vec32mem)                          alu32_source2 = m2_q;
    else if (i_andi)                         alu32_source2 = imm_zext;
    else if (i_addi32)                       alu32_source2 = imm_sext;
    else if (special_q inside {SP_BGTZ, SP_BLEZ}) alu32_source2 = '0;
    else                                     alu32_source2 = b32_q;

    alu64_operation = i_daddi ? OP_DADD : funct_q;
    alu64_source1   = a64_q;
    alu64_source2   = i_daddi ? imm_sext64 : b64_q;
    alu64_shamt     = {1'b0, sa_q};

    aluvec_operation = i_vec16hyb ? OP_VADD16 : (i_pavgb ? OP_PAVGB : OP_VADD32);
    aluvec_source1   = a64_q;
    aluvec_source2   = b64_q;
  end

  logic taken_d;
  always_comb begin
    unique case (special_q)
      SP_BEQ:  taken_d = alu32_zero;
      SP_BNE:  taken_d = !alu32_zero;
      SP_BGTZ: taken_d = !alu32_neg && !alu32_zero;
      SP_BLEZ: taken_d = alu32_neg || alu32_zero;
      default: taken_d = 1'b0;
    endcase
  end

  // ------------------------------------------------------ data memory
  always_comb begin
    dmem_addr1 = ea;
    dmem_addr2 = ea;
    dmem_we1   = 1'b0;
    dmem_we2   = 1'b0;
    dmem_din1  = b32_q;
    dmem_din2  = '0;
    if (state_q == ST_DECODE) begin
      dmem_addr1 = {27'd0, rs_q};
      dmem_addr2 = {27'd0, rt_q};
    end else if (state_q == ST_MEMORY) begin
      if (i_sw) begin
        dmem_we1 = 1'b1;
      end else if (i_vec32mem) begin
        dmem_we1   = 1'b1;
        dmem_addr1 = {27'd0, rs_q};
        dmem_din1  = r32_q;
      end else if (i_mmx_pair) begin
        dmem_we1   = 1'b1;
        dmem_we2   = 1'b1;
        dmem_addr1 = {27'd0, rs_q};
        dmem_addr2 = {27'd0, rs_q} + 32'd1;
        dmem_din1  = rv_q[63:32];
        dmem_din2  = rv_q[31:0];
      end
    end
  end

  // --------------------------------------------------- register writes
  logic wb;
  assign wb = (state_q == ST_WRITEBACK);

  always_comb begin
    rf32_we    = 1'b0;
    rf32_waddr = rt_q;
    rf32_wdata = r32_q;
    if (i_alu32 || i_mfhi || i_mflo) rf32_waddr = rd_q;
    if (i_mfhi)      rf32_wdata = hi32_q;
    else if (i_mflo) rf32_wdata = lo32_q;
    else if (i_lw)   rf32_wdata = ld_q;
    else if (i_mvdu) rf32_wdata = a64_q[63:32];
    else if (i_mvdl) rf32_wdata = a64_q[31:0];
    if (wb && (i_alu32 || i_mfhi || i_mflo || i_addi32 || i_lw || i_mvdu || i_mvdl))
      rf32_we = 1'b1;

    rf64_we    = 1'b0;
    rf64_waddr = i_daddi ? rt_q : rd_q;
    rf64_wdata = r64_q;
    if (i_mfdhi)      rf64_wdata = hi64_q;
    else if (i_mfdlo) rf64_wdata = lo64_q;
    else if (i_pavgb) rf64_wdata = rv_q;
    if (wb && (i_alu64 || i_daddi || i_mfdhi || i_mfdlo || i_pavgb))
      rf64_we = 1'b1;
  end

  // ------------------------------------------------- clocked datapath
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q       <= '0;
      special_q  <= '0;
      rs_q       <= '0;
      rt_q       <= '0;
      rd_q       <= '0;
      sa_q       <= '0;
      funct_q    <= '0;
      imm_q      <= '0;
      a32_q      <= '0;
      b32_q      <= '0;
      m1_q       <= '0;
      m2_q       <= '0;
      a64_q      <= '0;
      b64_q      <= '0;
      r32_q      <= '0;
      r32hi_q    <= '0;
      ld_q       <= '0;
      r64_q      <= '0;
      r64hi_q    <= '0;
      rv_q       <= '0;
      taken_q    <= 1'b0;
      hi32_q     <= '0;
      lo32_q     <= '0;
      hi64_q     <= '0;
      lo64_q     <= '0;
      loop_en_q  <= 1'b0;
      loop_cnt_q <= '0;
    end else begin
      unique case (state_q)
        ST_FETCH: begin
          if (!loop_en_q) begin
            special_q <= imem_data[31:26];
            rs_q      <= imem_data[25:21];
            rt_q      <= imem_data[20:16];
            rd_q      <= imem_data[15:11];
            sa_q      <= imem_data[10:6];
            funct_q   <= imem_data[5:0];
            imm_q     <= imem_data[15:0];
          end
        end
        ST_DECODE: begin
          a32_q <= rf32_rdata1;
          b32_q <= rf32_rdata2;
          a64_q <= rf64_rdata1;
          b64_q <= rf64_rdata2;
          m1_q  <= dmem_dout1;
          m2_q  <= dmem_dout2;
          if (i_loop && !loop_en_q) begin
            loop_en_q <= 1'b1;
            if (i_vec32mem)     loop_cnt_q <= imm_zext;
            else if (i_vec8mmx) loop_cnt_q <= 32'd8;
            else                loop_cnt_q <= {27'd0, sa_q};
          end
        end
        ST_EXECUTE: begin
          r32_q   <= alu32_result;
          r32hi_q <= alu32_result_hi;
          r64_q   <= alu64_result;
          r64hi_q <= alu64_result_hi;
          rv_q    <= aluvec_result;
          taken_q <= i_branch && taken_d;
        end
        ST_MEMORY: begin
          ld_q <= dmem_dout1;
        end
        ST_WRITEBACK: begin
          if (i_div32) begin
            hi32_q <= r32hi_q;
            lo32_q <= r32_q;
          end
          if (i_muldiv64) begin
            hi64_q <= r64hi_q;
            lo64_q <= r64_q;
          end
          if (loop_en_q) begin
            // next vector element
            if (i_vec32mem) begin
              rs_q <= rs_q - 5'd1;
              rt_q <= rt_q - 5'd1;
            end else begin
              rs_q <= rs_q - 5'd2;
              rt_q <= rt_q - 5'd1;
              rd_q <= rd_q - 5'd1;
            end
            if (loop_more) begin
              loop_cnt_q <= loop_cnt_q - 32'd1;
            end else begin
              loop_cnt_q <= '0;
              loop_en_q  <= 1'b0;
              pc_q       <= pc_q + 32'd1;
            end
          end else if (taken_q) begin
            pc_q <= pc_q + 32'd1 + imm_sext;
          end else begin
            pc_q <= pc_q + 32'd1;
          end
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------- observation
  assign imem_addr    = pc_q;
  assign pc           = pc_q;
  assign state        = state_q;
  assign loop_en      = loop_en_q;
  assign loop_cnt     = loop_cnt_q;
  assign retire       = wb && !loop_more;
  assign iteration    = wb && loop_en_q;
  assign branch_taken = wb && taken_q;

  // The two data-memory ports never write the same word in one cycle.
  a_dual_write_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    (dmem_we1 && dmem_we2) |-> (dmem_addr1 != dmem_addr2));
  // A loop is only active for a vector instruction.
  a_loop_only_vector: assert property (@(posedge clk) disable iff (!rst_n)
    (loop_en_q && state_q != ST_FETCH) |-> i_loop);

endmodule
