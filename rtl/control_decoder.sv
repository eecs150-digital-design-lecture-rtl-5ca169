// control_decoder: turns a MIPS instruction word into the control word the
// MIPS150 pipeline carries from X to M.
//
// Supported: addu/add, subu/sub, and, or, xor, nor, slt, sltu, sll, srl,
// sra, sllv, srlv, srav, jr, jalr; addiu/addi, slti, sltiu, andi, ori,
// xori, lui; lb, lbu, lh, lhu, lw; sb, sh, sw; beq, bne, blez, bgtz, bltz,
// bgez; j, jal. This set ("the most commonly used MIPS instructions") is
// this design's choice; add/addi/sub do not trap on overflow. Any other
// word decodes as a no-operation (no register or memory write, no branch).
// Conditional branches use the ALU subtraction; blez/bgtz/bltz/bgez
// compare rs against zero. jal and jalr write the return address PC+8
// (past the branch delay slot). Purely combinational.
module control_decoder
  import mips150_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [5:0] op, fn;
  logic [4:0] rt;
  assign op = instr[31:26];
  assign fn = instr[5:0];
  assign rt = instr[20:16];

  always_comb begin
    ctrl = '{alu_op: ALU_ADD, a_sel: A_RS, b_sel: B_RT, reg_write: 1'b0,
             dst: DST_RD, link: 1'b0, mem_read: 1'b0, mem_write: 1'b0,
             size: SZ_WORD, load_unsigned: 1'b0, branch: BR_NONE};
    unique case (op)
      OP_SPECIAL: begin
        ctrl.reg_write = 1'b1;
        unique case (fn)
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.a_sel = A_SHAMT; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.a_sel = A_SHAMT; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.a_sel = A_SHAMT; end
          FN_SLLV: ctrl.alu_op = ALU_SLL;
          FN_SRLV: ctrl.alu_op = ALU_SRL;
          FN_SRAV: ctrl.alu_op = ALU_SRA;
          FN_JR:   begin ctrl.reg_write = 1'b0; ctrl.branch = BR_JR; end
          FN_JALR: begin ctrl.branch = BR_JR; ctrl.link = 1'b1; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: ctrl.reg_write = 1'b0;
        endcase
      end
      OP_REGIMM: begin
        ctrl.alu_op = ALU_SUB; ctrl.b_sel = B_ZERO;
        if (rt == RT_BLTZ)      ctrl.branch = BR_LTZ;
        else if (rt == RT_BGEZ) ctrl.branch = BR_GEZ;
      end
      OP_J:    ctrl.branch = BR_J;
      OP_JAL:  begin ctrl.branch = BR_J; ctrl.link = 1'b1; ctrl.reg_write = 1'b1; ctrl.dst = DST_RA; end
      OP_BEQ:  begin ctrl.alu_op = ALU_SUB; ctrl.branch = BR_EQ; end
      OP_BNE:  begin ctrl.alu_op = ALU_SUB; ctrl.branch = BR_NE; end
      OP_BLEZ: begin ctrl.alu_op = ALU_SUB; ctrl.b_sel = B_ZERO; ctrl.branch = BR_LEZ; end
      OP_BGTZ: begin ctrl.alu_op = ALU_SUB; ctrl.b_sel = B_ZERO; ctrl.branch = BR_GTZ; end
      OP_ADDI, OP_ADDIU: begin ctrl.alu_op = ALU_ADD;  ctrl.b_sel = B_IMM_SEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; end
      OP_SLTI:  begin ctrl.alu_op = ALU_SLT;  ctrl.b_sel = B_IMM_SEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; end
      OP_SLTIU: begin ctrl.alu_op = ALU_SLTU; ctrl.b_sel = B_IMM_SEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; end
      OP_ANDI:  begin ctrl.alu_op = ALU_AND;  ctrl.b_sel = B_IMM_ZEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; end
      OP_ORI:   begin ctrl.alu_op = ALU_OR;   ctrl.b_sel = B_IMM_ZEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; end
      OP_XORI:  begin ctrl.alu_op = ALU_XOR;  ctrl.b_sel = B_IMM_ZEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; end
      OP_LUI:   begin ctrl.alu_op = ALU_LUI;  ctrl.b_sel = B_IMM_ZEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; end
      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        ctrl.b_sel = B_IMM_SEXT; ctrl.reg_write = 1'b1; ctrl.dst = DST_RT; ctrl.mem_read = 1'b1;
        ctrl.size = (op == OP_LW) ? SZ_WORD : (op == OP_LH || op == OP_LHU) ? SZ_HALF : SZ_BYTE;
        ctrl.load_unsigned = (op == OP_LBU || op == OP_LHU);
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.b_sel = B_IMM_SEXT; ctrl.mem_write = 1'b1;
        ctrl.size = (op == OP_SW) ? SZ_WORD : (op == OP_SH) ? SZ_HALF : SZ_BYTE;
      end
      default: ;
    endcase
  end
endmodule
