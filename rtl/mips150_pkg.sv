// mips150_pkg: types and constants shared by the MIPS150 processor and its
// serial-line I/O.
//
// Holds the instruction-field encodings of the MIPS integer subset the
// processor executes, the decoded control word passed down the three-stage
// pipeline (I, X, M), the data-memory request bundle the X stage sends to the
// data memory and to the memory-mapped I/O, and the serial-line register
// addresses 0xFFFF0000..0xFFFF000C (receiver control, receiver data,
// transmitter control, transmitter data). The opcodes are the standard MIPS
// ones; which instructions are included is this design's choice (the common
// integer ALU, load/store, branch and jump instructions, no multiply, divide
// or exceptions). The encode helpers at the bottom build instruction words
// and are used by the testbenches to write small programs.
package mips150_pkg;

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_REGIMM  = 6'h01;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQ     = 6'h04;
  localparam logic [5:0] OP_BNE     = 6'h05;
  localparam logic [5:0] OP_BLEZ    = 6'h06;
  localparam logic [5:0] OP_BGTZ    = 6'h07;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_ADDIU   = 6'h09;
  localparam logic [5:0] OP_SLTI    = 6'h0a;
  localparam logic [5:0] OP_SLTIU   = 6'h0b;
  localparam logic [5:0] OP_ANDI    = 6'h0c;
  localparam logic [5:0] OP_ORI     = 6'h0d;
  localparam logic [5:0] OP_XORI    = 6'h0e;
  localparam logic [5:0] OP_LUI     = 6'h0f;
  localparam logic [5:0] OP_LB      = 6'h20;
  localparam logic [5:0] OP_LH      = 6'h21;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_LBU     = 6'h24;
  localparam logic [5:0] OP_LHU     = 6'h25;
  localparam logic [5:0] OP_SB      = 6'h28;
  localparam logic [5:0] OP_SH      = 6'h29;
  localparam logic [5:0] OP_SW      = 6'h2b;

  // SPECIAL function codes
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2a;
  localparam logic [5:0] FN_SLTU = 6'h2b;

  // REGIMM rt codes
  localparam logic [4:0] RT_BLTZ = 5'h00;
  localparam logic [4:0] RT_BGEZ = 5'h01;

  // ------------------------------------------------------------- ALU ops
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  // Branch / jump kinds resolved in the X stage
  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_e;

  // Which operand feeds ALU input A
  typedef enum logic [1:0] {A_RS, A_SHAMT, A_ZERO} a_sel_e;
  // Which operand feeds ALU input B
  typedef enum logic [1:0] {B_RT, B_IMM_SEXT, B_IMM_ZEXT, B_ZERO} b_sel_e;
  // Destination register field
  typedef enum logic [1:0] {DST_RD, DST_RT, DST_RA} dst_e;
  // Access size of loads and stores
  typedef enum logic [1:0] {SZ_BYTE, SZ_HALF, SZ_WORD} size_e;

  // Decoded control word of one instruction
  typedef struct packed {
    alu_op_e alu_op;
    a_sel_e  a_sel;
    b_sel_e  b_sel;
    logic    reg_write;
    dst_e    dst;
    logic    link;        // writes the return address (PC+8) instead of ALU
    logic    mem_read;
    logic    mem_write;
    size_e   size;
    logic    load_unsigned;
    br_e     branch;
  } ctrl_t;

  // Data-side request issued by the X stage, taken at the X->M clock edge
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;   // store data already placed on its byte lanes
    logic [3:0]  be;      // byte enables (little-endian lanes)
    logic        we;
    logic        re;
  } mem_req_t;

  // ------------------------------------------------ memory-mapped serial I/O
  localparam logic [31:0] IO_RX_CTRL = 32'hFFFF_0000;
  localparam logic [31:0] IO_RX_DATA = 32'hFFFF_0004;
  localparam logic [31:0] IO_TX_CTRL = 32'hFFFF_0008;
  localparam logic [31:0] IO_TX_DATA = 32'hFFFF_000C;

  function automatic logic is_io(input logic [31:0] addr);
    return addr[31:16] == 16'hFFFF;
  endfunction

  // ------------------------------------------------------ encode helpers
  function automatic logic [31:0] enc_r(input logic [5:0] fn, input logic [4:0] rd,
                                        input logic [4:0] rs, input logic [4:0] rt,
                                        input logic [4:0] sh = 5'd0);
    return {OP_SPECIAL, rs, rt, rd, sh, fn};
  endfunction

  function automatic logic [31:0] enc_i(input logic [5:0] op, input logic [4:0] rt,
                                        input logic [4:0] rs, input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] enc_j(input logic [5:0] op, input logic [25:0] idx);
    return {op, idx};
  endfunction

  localparam logic [31:0] NOP = 32'h0000_0000;  // sll $0,$0,0

endpackage
