// mips150_cpu: the MIPS150 processor, a three-stage MIPS pipeline.
//
// The slowest parts of the datapath (instruction memory, ALU, data memory)
// each get their own stage:
//   I  the PC register addresses the instruction memory; the fetched word is
//      captured in the instruction register at the end of I.
//   X  decode, register-file read, ALU (result, memory address or branch
//      compare), branch/jump target; the next PC is chosen here.
//   M  data memory or I/O access (read and write on the edge that starts
//      M); the loaded or computed value is written to the register file on
//      the edge that ends M.
// Hazards are handled without any stall, as the architecture allows:
//   * Branches and jumps resolve in X and update the PC at the end of X. The
//     instruction fetched meanwhile (the one after the branch) is the
//     architected branch delay slot and always executes, so nothing else is
//     needed. jal/jalr link PC+8.
//   * A value produced by an ALU instruction in M is forwarded from the M
//     result register to the ALU inputs (and store data, jr target) of the
//     instruction in X (see forward_unit).
//   * A load's value arrives during M; the next instruction is the
//     architected load delay slot and reads the old register value. The one
//     after that reads the register file after the write, so no
//     register-file bypass is needed.
// Only the rising clock edge is used. Reset (synchronous, active high)
// starts fetching at RESET_PC and empties X and M. Data accesses go out as
// one mem_req_t; `dmem_rdata` and `io_rdata` are the registered read data of
// the data memory and the I/O adapter during M, chosen by address bits
// 31:16 (0xFFFF = I/O). Byte and halfword accesses use little-endian lanes;
// address bits that would make an access unaligned are ignored.
module mips150_cpu
  import mips150_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output mem_req_t    dreq,
  input  logic [31:0] dmem_rdata,
  input  logic [31:0] io_rdata
);
  // ------------------------------------------------------------- I stage
  logic [31:0] pc, pc_next;
  assign imem_addr = pc;

  // ------------------------------------------------------------- X stage
  logic [31:0] x_pc;
  logic        x_valid;
  logic [31:0] x_instr;
  ctrl_t       x_ctrl;
  logic [4:0]  x_rs, x_rt, x_rd, x_wa;
  logic [31:0] rf_rd1, rf_rd2, x_rs_val, x_rt_val;
  logic [31:0] alu_a, alu_b, alu_y;
  logic        alu_zero;
  logic        fwd_a, fwd_b;
  logic        x_taken;
  logic [31:0] x_target, x_imm_sext, x_imm_zext, x_pc_plus4;

  // ------------------------------------------------------------- M stage
  logic        m_we, m_load, m_unsigned, m_io;
  size_e       m_size;
  logic [1:0]  m_lo;
  logic [4:0]  m_wa;
  logic [31:0] m_result, m_word, m_load_val, m_wb;

  assign x_instr = x_valid ? imem_rdata : NOP;
  assign x_rs    = x_instr[25:21];
  assign x_rt    = x_instr[20:16];
  assign x_rd    = x_instr[15:11];

  control_decoder u_dec (.instr(x_instr), .ctrl(x_ctrl));

  regfile u_rf (
    .clk, .ra1(x_rs), .ra2(x_rt), .rd1(rf_rd1), .rd2(rf_rd2),
    .we(m_we), .wa(m_wa), .wd(m_wb));

  forward_unit u_fwd (
    .x_rs, .x_rt, .m_we, .m_load, .m_wa, .fwd_a, .fwd_b);

  assign x_rs_val   = fwd_a ? m_result : rf_rd1;
  assign x_rt_val   = fwd_b ? m_result : rf_rd2;
  assign x_imm_sext = {{16{x_instr[15]}}, x_instr[15:0]};
  assign x_imm_zext = {16'd0, x_instr[15:0]};
  assign x_pc_plus4 = x_pc + 32'd4;

  always_comb begin
    unique case (x_ctrl.a_sel)
      A_SHAMT: alu_a = {27'd0, x_instr[10:6]};
      A_ZERO:  alu_a = '0;
      default: alu_a = x_rs_val;
    endcase
    unique case (x_ctrl.b_sel)
      B_IMM_SEXT: alu_b = x_imm_sext;
      B_IMM_ZEXT: alu_b = x_imm_zext;
      B_ZERO:     alu_b = '0;
      default:    alu_b = x_rt_val;
    endcase
  end

  alu u_alu (.op(x_ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .zero(alu_zero));

  // Branch decision from the ALU subtraction rs - rt (or rs - 0)
  always_comb begin
    unique case (x_ctrl.branch)
      BR_EQ:   x_taken = alu_zero;
      BR_NE:   x_taken = !alu_zero;
      BR_LEZ:  x_taken = alu_zero || alu_y[31];
      BR_GTZ:  x_taken = !alu_zero && !alu_y[31];
      BR_LTZ:  x_taken = alu_y[31];
      BR_GEZ:  x_taken = !alu_y[31];
      BR_J, BR_JR: x_taken = 1'b1;
      default: x_taken = 1'b0;
    endcase
    unique case (x_ctrl.branch)
      BR_J:    x_target = {x_pc_plus4[31:28], x_instr[25:0], 2'b00};
      BR_JR:   x_target = x_rs_val;
      default: x_target = x_pc_plus4 + {x_imm_sext[29:0], 2'b00};
    endcase
  end

  // The delay-slot instruction is in I now; the PC after it is the target.
  assign pc_next = x_taken ? x_target : pc + 32'd4;

  always_comb begin
    unique case (x_ctrl.dst)
      DST_RT:  x_wa = x_rt;
      DST_RA:  x_wa = 5'd31;
      default: x_wa = x_rd;
    endcase
  end

  // Data request for the X->M edge: store data placed on its byte lanes
  always_comb begin
    dreq.addr = alu_y;
    dreq.re   = x_ctrl.mem_read;
    dreq.we   = x_ctrl.mem_write;
    unique case (x_ctrl.size)
      SZ_BYTE: begin
        dreq.wdata = {4{x_rt_val[7:0]}};
        dreq.be    = 4'b0001 << alu_y[1:0];
      end
      SZ_HALF: begin
        dreq.wdata = {2{x_rt_val[15:0]}};
        dreq.be    = alu_y[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        dreq.wdata = x_rt_val;
        dreq.be    = 4'b1111;
      end
    endcase
  end

  // ------------------------------------------------------- pipeline regs
  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= RESET_PC;
      x_pc     <= RESET_PC;
      x_valid  <= 1'b0;
      m_we     <= 1'b0;
      m_load   <= 1'b0;
      m_wa     <= '0;
      m_result <= '0;
      m_size   <= SZ_WORD;
      m_unsigned <= 1'b0;
      m_lo     <= '0;
      m_io     <= 1'b0;
    end else begin
      pc         <= pc_next;
      x_pc       <= pc;
      x_valid    <= 1'b1;
      m_we       <= x_ctrl.reg_write;
      m_load     <= x_ctrl.mem_read;
      m_wa       <= x_wa;
      m_result   <= x_ctrl.link ? x_pc + 32'd8 : alu_y;
      m_size     <= x_ctrl.size;
      m_unsigned <= x_ctrl.load_unsigned;
      m_lo       <= alu_y[1:0];
      m_io       <= is_io(alu_y);
    end
  end

  // --------------------------------------------------------- M: load align
  assign m_word = m_io ? io_rdata : dmem_rdata;
  always_comb begin
    unique case (m_size)
      SZ_BYTE: begin
        logic [7:0] b;
        b = m_word[8*m_lo +: 8];
        m_load_val = {{24{b[7] & !m_unsigned}}, b};
      end
      SZ_HALF: begin
        logic [15:0] h;
        h = m_lo[1] ? m_word[31:16] : m_word[15:0];
        m_load_val = {{16{h[15] & !m_unsigned}}, h};
      end
      default: m_load_val = m_word;
    endcase
  end
  assign m_wb = m_load ? m_load_val : m_result;

  // A single instruction never both loads and stores.
  ap_rw_exclusive: assert property (@(posedge clk) disable iff (rst) !(dreq.re && dreq.we));
endmodule
