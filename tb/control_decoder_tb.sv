// control_decoder_tb: self-checking test of the instruction decoder. Every
// supported instruction is decoded and its control word compared with the
// expected fields; unsupported words must decode to no register write, no
// memory access and no branch.
module control_decoder_tb;
  import mips150_pkg::*;
  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control_decoder dut (.instr, .ctrl);

  // expected: alu op, reg_write, dst, mem_read, mem_write, size, unsigned, branch, link, b_sel
  task automatic expect_ctrl(string nm, logic [31:0] w, alu_op_e op, logic rw, dst_e dst,
                             logic mr, logic mw, size_e sz, logic us, br_e br, logic lk,
                             b_sel_e bs, a_sel_e as = A_RS);
    instr = w; #1;
    checks++;
    if (ctrl.reg_write !== rw || ctrl.mem_read !== mr || ctrl.mem_write !== mw ||
        ctrl.branch !== br || ctrl.link !== lk ||
        (rw && !lk && ctrl.dst !== dst) || (lk && rw && ctrl.dst !== dst) ||
        ((mr || mw) && ctrl.size !== sz) || (mr && ctrl.load_unsigned !== us) ||
        (!mr && !mw && br inside {BR_NONE} && rw && !lk && (ctrl.alu_op !== op || ctrl.b_sel !== bs || ctrl.a_sel !== as)) ||
        ((mr || mw) && (ctrl.alu_op !== ALU_ADD || ctrl.b_sel !== B_IMM_SEXT)) ||
        (br inside {BR_EQ, BR_NE} && (ctrl.alu_op !== ALU_SUB || ctrl.b_sel !== B_RT)) ||
        (br inside {BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ} && (ctrl.alu_op !== ALU_SUB || ctrl.b_sel !== B_ZERO))) begin
      failures++;
      $display("FAIL %s: %p", nm, ctrl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) begin
      logic [4:0] a, b, c;
      a = 5'($urandom); b = 5'($urandom); c = 5'($urandom);
      expect_ctrl("addu", enc_r(FN_ADDU, a, b, c), ALU_ADD, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("add",  enc_r(FN_ADD,  a, b, c), ALU_ADD, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("subu", enc_r(FN_SUBU, a, b, c), ALU_SUB, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("sub",  enc_r(FN_SUB,  a, b, c), ALU_SUB, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("and",  enc_r(FN_AND,  a, b, c), ALU_AND, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("or",   enc_r(FN_OR,   a, b, c), ALU_OR,  1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("xor",  enc_r(FN_XOR,  a, b, c), ALU_XOR, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("nor",  enc_r(FN_NOR,  a, b, c), ALU_NOR, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("slt",  enc_r(FN_SLT,  a, b, c), ALU_SLT, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("sltu", enc_r(FN_SLTU, a, b, c), ALU_SLTU,1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("sll",  enc_r(FN_SLL,  a, 0, c, 5'd3), ALU_SLL, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT, A_SHAMT);
      expect_ctrl("srl",  enc_r(FN_SRL,  a, 0, c, 5'd3), ALU_SRL, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT, A_SHAMT);
      expect_ctrl("sra",  enc_r(FN_SRA,  a, 0, c, 5'd3), ALU_SRA, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT, A_SHAMT);
      expect_ctrl("sllv", enc_r(FN_SLLV, a, b, c), ALU_SLL, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("srlv", enc_r(FN_SRLV, a, b, c), ALU_SRL, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("srav", enc_r(FN_SRAV, a, b, c), ALU_SRA, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("jr",   enc_r(FN_JR,   0, b, 0), ALU_ADD, 0, DST_RD, 0, 0, SZ_WORD, 0, BR_JR, 0, B_RT);
      expect_ctrl("jalr", enc_r(FN_JALR, a, b, 0), ALU_ADD, 1, DST_RD, 0, 0, SZ_WORD, 0, BR_JR, 1, B_RT);
      expect_ctrl("addiu",enc_i(OP_ADDIU, a, b, 16'h8001), ALU_ADD, 1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("addi", enc_i(OP_ADDI,  a, b, 16'h8001), ALU_ADD, 1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("slti", enc_i(OP_SLTI,  a, b, 16'h8001), ALU_SLT, 1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("sltiu",enc_i(OP_SLTIU, a, b, 16'h8001), ALU_SLTU,1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("andi", enc_i(OP_ANDI,  a, b, 16'h8001), ALU_AND, 1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_ZEXT);
      expect_ctrl("ori",  enc_i(OP_ORI,   a, b, 16'h8001), ALU_OR,  1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_ZEXT);
      expect_ctrl("xori", enc_i(OP_XORI,  a, b, 16'h8001), ALU_XOR, 1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_ZEXT);
      expect_ctrl("lui",  enc_i(OP_LUI,   a, 0, 16'hFFFF), ALU_LUI, 1, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_ZEXT);
      expect_ctrl("lb",   enc_i(OP_LB,  a, b, 16'h4), ALU_ADD, 1, DST_RT, 1, 0, SZ_BYTE, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("lbu",  enc_i(OP_LBU, a, b, 16'h4), ALU_ADD, 1, DST_RT, 1, 0, SZ_BYTE, 1, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("lh",   enc_i(OP_LH,  a, b, 16'h4), ALU_ADD, 1, DST_RT, 1, 0, SZ_HALF, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("lhu",  enc_i(OP_LHU, a, b, 16'h4), ALU_ADD, 1, DST_RT, 1, 0, SZ_HALF, 1, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("lw",   enc_i(OP_LW,  a, b, 16'h4), ALU_ADD, 1, DST_RT, 1, 0, SZ_WORD, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("sb",   enc_i(OP_SB,  a, b, 16'h4), ALU_ADD, 0, DST_RT, 0, 1, SZ_BYTE, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("sh",   enc_i(OP_SH,  a, b, 16'h4), ALU_ADD, 0, DST_RT, 0, 1, SZ_HALF, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("sw",   enc_i(OP_SW,  a, b, 16'h4), ALU_ADD, 0, DST_RT, 0, 1, SZ_WORD, 0, BR_NONE, 0, B_IMM_SEXT);
      expect_ctrl("beq",  enc_i(OP_BEQ,  a, b, 16'h4), ALU_SUB, 0, DST_RT, 0, 0, SZ_WORD, 0, BR_EQ, 0, B_RT);
      expect_ctrl("bne",  enc_i(OP_BNE,  a, b, 16'h4), ALU_SUB, 0, DST_RT, 0, 0, SZ_WORD, 0, BR_NE, 0, B_RT);
      expect_ctrl("blez", enc_i(OP_BLEZ, 0, b, 16'h4), ALU_SUB, 0, DST_RT, 0, 0, SZ_WORD, 0, BR_LEZ, 0, B_ZERO);
      expect_ctrl("bgtz", enc_i(OP_BGTZ, 0, b, 16'h4), ALU_SUB, 0, DST_RT, 0, 0, SZ_WORD, 0, BR_GTZ, 0, B_ZERO);
      expect_ctrl("bltz", enc_i(OP_REGIMM, RT_BLTZ, b, 16'h4), ALU_SUB, 0, DST_RT, 0, 0, SZ_WORD, 0, BR_LTZ, 0, B_ZERO);
      expect_ctrl("bgez", enc_i(OP_REGIMM, RT_BGEZ, b, 16'h4), ALU_SUB, 0, DST_RT, 0, 0, SZ_WORD, 0, BR_GEZ, 0, B_ZERO);
      expect_ctrl("j",    enc_j(OP_J,   26'h12345), ALU_ADD, 0, DST_RD, 0, 0, SZ_WORD, 0, BR_J, 0, B_RT);
      expect_ctrl("jal",  enc_j(OP_JAL, 26'h12345), ALU_ADD, 1, DST_RA, 0, 0, SZ_WORD, 0, BR_J, 1, B_RT);
      // unsupported opcodes and function codes
      expect_ctrl("cop0", {6'h10, 26'($urandom)}, ALU_ADD, 0, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("mult", enc_r(6'h18, a, b, c), ALU_ADD, 0, DST_RD, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_RT);
      expect_ctrl("regimm other", enc_i(OP_REGIMM, 5'h10, b, 16'h4), ALU_SUB, 0, DST_RT, 0, 0, SZ_WORD, 0, BR_NONE, 0, B_ZERO);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
