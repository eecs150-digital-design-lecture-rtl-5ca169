// mips150_cpu_tb: self-checking test of the three-stage MIPS150 pipeline.
//
// The CPU runs with an instruction memory and a data memory; the I/O read
// data is tied to zero. Each program is also run on an instruction-level
// reference model in this file, which executes one instruction at a time
// with the architected rules: the instruction after a branch or jump (the
// delay slot) always executes, and the instruction after a load still sees
// the old value of the loaded register. The test compares
//   * the fetch address of every cycle with the model's instruction
//     sequence (one instruction per cycle, no stall, delay slots taken),
//   * all registers and the whole data memory when the program halts.
// The first program is written by hand (forwarding, load delay slot, branch
// delay slot, jal/jr) and its key results are also checked against values
// worked out by hand; the rest are random programs dense in hazards. The
// test counts forwarded operands, load-delay-slot reads of an in-flight
// load and taken branches, and fails if any never happened.
module mips150_cpu_tb;
  import mips150_pkg::*;

  localparam int IWORDS = 1024, DWORDS = 64;
  localparam int NPROG = 40, PLEN = 300;

  logic        clk = 0, rst;
  logic [31:0] imem_addr, imem_rdata, dmem_rdata;
  mem_req_t    dreq;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_load_slot = 0, n_taken = 0;

  mips150_cpu dut (.clk, .rst, .imem_addr, .imem_rdata, .dreq, .dmem_rdata, .io_rdata(32'd0));
  imem #(.WORDS(IWORDS)) u_imem (.clk, .en(1'b1), .addr(imem_addr), .rdata(imem_rdata));
  dmem #(.WORDS(DWORDS)) u_dmem (.clk, .req(dreq), .rdata(dmem_rdata));

  always #5 clk = ~clk;

  // mechanism counters, observed on the pipeline's own signals
  always @(posedge clk) if (!rst) begin
    if (dut.fwd_a || dut.fwd_b) n_fwd++;
    if (dut.m_load && dut.m_we && dut.m_wa != 0 &&
        (dut.x_rs == dut.m_wa || dut.x_rt == dut.m_wa) && dut.x_instr != 0) n_load_slot++;
    if (dut.x_taken && dut.x_ctrl.branch inside {BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ}) n_taken++;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ reference model
  logic [31:0] prog [$];
  logic [31:0] R [32];
  logic [31:0] M [DWORDS];
  logic [31:0] trace [$];

  function automatic logic [31:0] sx16(logic [15:0] v); return {{16{v[15]}}, v}; endfunction

  task automatic iss_run(int halt_idx);
    logic [31:0] pc, npc, ins, a, b, res, target, addr, w;
    logic        pend; logic [4:0] pend_r; logic [31:0] pend_v;
    int steps;
    pc = 0; npc = 4; pend = 0; pend_r = 0; pend_v = 0; steps = 0;
    trace.delete();
    while (pc != 32'(halt_idx * 4) && steps < 100000) begin
      logic wr, taken, ld;
      logic [4:0] wd;
      logic [5:0] op, fn;
      trace.push_back(pc);
      ins = prog[pc >> 2];
      op = ins[31:26]; fn = ins[5:0];
      a = R[ins[25:21]]; b = R[ins[20:16]];
      wr = 0; wd = 0; res = 0; taken = 0; target = 0; ld = 0;
      case (op)
        OP_SPECIAL: begin
          wr = 1; wd = ins[15:11];
          case (fn)
            FN_SLL:  res = b << ins[10:6];
            FN_SRL:  res = b >> ins[10:6];
            FN_SRA:  res = $signed(b) >>> ins[10:6];
            FN_SLLV: res = b << a[4:0];
            FN_SRLV: res = b >> a[4:0];
            FN_SRAV: res = $signed(b) >>> a[4:0];
            FN_JR:   begin wr = 0; taken = 1; target = a; end
            FN_JALR: begin taken = 1; target = a; res = pc + 8; end
            FN_ADD, FN_ADDU: res = a + b;
            FN_SUB, FN_SUBU: res = a - b;
            FN_AND:  res = a & b;
            FN_OR:   res = a | b;
            FN_XOR:  res = a ^ b;
            FN_NOR:  res = ~(a | b);
            FN_SLT:  res = 32'($signed(a) < $signed(b));
            FN_SLTU: res = 32'(a < b);
            default: wr = 0;
          endcase
        end
        OP_REGIMM: begin
          target = pc + 4 + (sx16(ins[15:0]) << 2);
          if (ins[20:16] == RT_BLTZ) taken = $signed(a) < 0;
          if (ins[20:16] == RT_BGEZ) taken = $signed(a) >= 0;
        end
        OP_J:    begin taken = 1; target = {npc[31:28], ins[25:0], 2'b00}; end
        OP_JAL:  begin taken = 1; target = {npc[31:28], ins[25:0], 2'b00}; wr = 1; wd = 31; res = pc + 8; end
        OP_BEQ:  begin taken = a == b; target = pc + 4 + (sx16(ins[15:0]) << 2); end
        OP_BNE:  begin taken = a != b; target = pc + 4 + (sx16(ins[15:0]) << 2); end
        OP_BLEZ: begin taken = $signed(a) <= 0; target = pc + 4 + (sx16(ins[15:0]) << 2); end
        OP_BGTZ: begin taken = $signed(a) > 0; target = pc + 4 + (sx16(ins[15:0]) << 2); end
        OP_ADDI, OP_ADDIU: begin wr = 1; wd = ins[20:16]; res = a + sx16(ins[15:0]); end
        OP_SLTI:  begin wr = 1; wd = ins[20:16]; res = 32'($signed(a) < $signed(sx16(ins[15:0]))); end
        OP_SLTIU: begin wr = 1; wd = ins[20:16]; res = 32'(a < sx16(ins[15:0])); end
        OP_ANDI:  begin wr = 1; wd = ins[20:16]; res = a & {16'd0, ins[15:0]}; end
        OP_ORI:   begin wr = 1; wd = ins[20:16]; res = a | {16'd0, ins[15:0]}; end
        OP_XORI:  begin wr = 1; wd = ins[20:16]; res = a ^ {16'd0, ins[15:0]}; end
        OP_LUI:   begin wr = 1; wd = ins[20:16]; res = {ins[15:0], 16'd0}; end
        OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
          addr = a + sx16(ins[15:0]);
          w = (addr[31:16] == 16'hFFFF) ? 32'd0 : M[addr[7:2]];
          case (op)
            OP_LB:  res = {{24{w[8*addr[1:0]+7]}}, w[8*addr[1:0] +: 8]};
            OP_LBU: res = {24'd0, w[8*addr[1:0] +: 8]};
            OP_LH:  res = addr[1] ? {{16{w[31]}}, w[31:16]} : {{16{w[15]}}, w[15:0]};
            OP_LHU: res = addr[1] ? {16'd0, w[31:16]} : {16'd0, w[15:0]};
            default: res = w;
          endcase
          ld = 1; wd = ins[20:16];
        end
        OP_SB, OP_SH, OP_SW: begin
          addr = a + sx16(ins[15:0]);
          if (addr[31:16] != 16'hFFFF) begin
            if (op == OP_SW) M[addr[7:2]] = b;
            else if (op == OP_SH) M[addr[7:2]][16*addr[1] +: 16] = b[15:0];
            else M[addr[7:2]][8*addr[1:0] +: 8] = b[7:0];
          end
        end
        default: ;
      endcase
      // a load issued by the previous instruction lands after this one's reads
      if (pend && pend_r != 0) R[pend_r] = pend_v;
      pend = 0;
      if (wr && wd != 0) R[wd] = res;
      if (ld) begin pend = 1; pend_r = wd; pend_v = res; end
      pc = npc;
      npc = taken ? target : npc + 4;
      steps++;
    end
    if (pend && pend_r != 0) R[pend_r] = pend_v;
    trace.push_back(pc);
  endtask

  // ------------------------------------------------ program generator
  function automatic logic [4:0] src();
    int k = $urandom_range(11);
    return (k == 11) ? 5'd31 : (k == 10) ? 5'd0 : 5'(k);
  endfunction
  function automatic logic [4:0] dst();
    int k = $urandom_range(8);
    return (k == 8) ? 5'd31 : (k == 0) ? 5'd8 : 5'(k);   // never $9
  endfunction

  function automatic logic [31:0] rand_plain();
    int k = $urandom_range(99);
    logic [15:0] imm = 16'($urandom);
    logic [5:0] fns [13] = '{FN_ADDU, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR, FN_SLT, FN_SLTU,
                             FN_SLLV, FN_SRLV, FN_SRAV, FN_ADD, FN_SUB};
    logic [5:0] iops [7] = '{OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_ADDI};
    logic [5:0] lops [5] = '{OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU};
    logic [5:0] sops [3] = '{OP_SW, OP_SH, OP_SB};
    if (k < 35) return enc_r(fns[$urandom_range(12)], dst(), src(), src());
    if (k < 42) return enc_r(k[0] ? FN_SRL : (k[1] ? FN_SRA : FN_SLL), dst(), 5'd0, src(), 5'($urandom));
    if (k < 60) return enc_i(iops[$urandom_range(6)], dst(), src(), imm);
    if (k < 64) return enc_i(OP_LUI, dst(), 5'd0, imm);
    if (k < 82) return enc_i(lops[$urandom_range(4)], dst(), $urandom_range(3) == 0 ? src() : 5'd0, 16'($urandom_range(255)));
    return enc_i(sops[$urandom_range(2)], src(), $urandom_range(3) == 0 ? src() : 5'd0, 16'($urandom_range(255)));
  endfunction

  task automatic gen_random(int n, output int halt_idx);
    int init = 31;
    prog.delete();
    halt_idx = init + n;
    for (int r = 1; r < 32; r++)
      prog.push_back(enc_i(OP_ADDIU, 5'(r), 5'd0, r == 9 ? 16'(halt_idx * 4) : 16'($urandom)));
    for (int i = init; i < halt_idx; i++) begin
      logic prev_branch = (i > init) && (prog[i-1][31:26] inside {OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_REGIMM, OP_J, OP_JAL} ||
                                         (prog[i-1][31:26] == OP_SPECIAL && prog[i-1][5:0] inside {FN_JR, FN_JALR}));
      int k = $urandom_range(99);
      if (prev_branch || i >= halt_idx - 1 || k >= 22) prog.push_back(rand_plain());
      else begin
        int tgt = i + 2 + $urandom_range(4);
        logic [15:0] off;
        if (tgt > halt_idx) tgt = halt_idx;
        off = 16'(tgt - (i + 1));
        case ($urandom_range(9))
          0: prog.push_back(enc_i(OP_BEQ, src(), src(), off));
          1: prog.push_back(enc_i(OP_BNE, src(), src(), off));
          2: prog.push_back(enc_i(OP_BLEZ, 5'd0, src(), off));
          3: prog.push_back(enc_i(OP_BGTZ, 5'd0, src(), off));
          4: prog.push_back(enc_i(OP_REGIMM, RT_BLTZ, src(), off));
          5: prog.push_back(enc_i(OP_REGIMM, RT_BGEZ, src(), off));
          6: prog.push_back(enc_j(OP_J, 26'(tgt)));
          7: prog.push_back(enc_j(OP_JAL, 26'(tgt)));
          8: prog.push_back($urandom_range(7) == 0 ? enc_r(FN_JR, 5'd0, 5'd9, 5'd0) : enc_i(OP_BEQ, src(), src(), off));
          default: prog.push_back($urandom_range(7) == 0 ? enc_r(FN_JALR, dst(), 5'd9, 5'd0) : enc_i(OP_BNE, src(), src(), off));
        endcase
      end
    end
    prog.push_back(enc_i(OP_BEQ, 5'd0, 5'd0, 16'hFFFF));   // halt: branch to itself
    prog.push_back(NOP);
  endtask

  task automatic gen_directed(output int halt_idx);
    prog.delete();
    prog.push_back(enc_i(OP_ADDIU, 5'd1, 5'd0, 16'd5));         // 0
    prog.push_back(enc_i(OP_ADDIU, 5'd2, 5'd0, 16'd7));         // 1
    prog.push_back(enc_i(OP_ADDIU, 5'd5, 5'd0, 16'd100));       // 2
    prog.push_back(enc_r(FN_ADDU, 5'd3, 5'd1, 5'd2));           // 3  $2 forwarded
    prog.push_back(enc_r(FN_SUBU, 5'd4, 5'd3, 5'd1));           // 4  $3 forwarded
    prog.push_back(enc_i(OP_SW, 5'd4, 5'd0, 16'd0));            // 5  store data forwarded
    prog.push_back(enc_i(OP_LW, 5'd5, 5'd0, 16'd0));            // 6
    prog.push_back(enc_r(FN_ADDU, 5'd6, 5'd5, 5'd0));           // 7  load delay slot: old $5
    prog.push_back(enc_r(FN_ADDU, 5'd7, 5'd5, 5'd0));           // 8  new $5
    prog.push_back(enc_i(OP_BEQ, 5'd1, 5'd1, 16'd2));           // 9  -> 12
    prog.push_back(enc_i(OP_ADDIU, 5'd8, 5'd0, 16'd1));         // 10 delay slot, executes
    prog.push_back(enc_i(OP_ADDIU, 5'd10, 5'd0, 16'd1));        // 11 skipped
    prog.push_back(enc_j(OP_JAL, 26'd17));                      // 12 call 17
    prog.push_back(enc_i(OP_ADDIU, 5'd11, 5'd0, 16'd3));        // 13 delay slot
    prog.push_back(enc_i(OP_ADDIU, 5'd13, 5'd0, 16'd80));       // 14 $13 = address of 20
    prog.push_back(enc_r(FN_JR, 5'd0, 5'd13, 5'd0));            // 15 jr target forwarded
    prog.push_back(enc_i(OP_ADDIU, 5'd14, 5'd0, 16'd9));        // 16 delay slot
    prog.push_back(enc_r(FN_JR, 5'd0, 5'd31, 5'd0));            // 17 return to 14
    prog.push_back(enc_i(OP_ADDIU, 5'd12, 5'd0, 16'd4));        // 18 delay slot
    prog.push_back(enc_i(OP_ADDIU, 5'd10, 5'd0, 16'd1));        // 19 never executed
    prog.push_back(enc_i(OP_BEQ, 5'd0, 5'd0, 16'hFFFF));        // 20 halt
    prog.push_back(NOP);                                        // 21
    halt_idx = 20;
  endtask

  task automatic run_and_compare(int halt_idx, string name);
    logic [31:0] fetch [$];
    int ncyc;
    rst = 1;
    repeat (2) @(negedge clk);   // reset empties M before registers are preset
    for (int i = 0; i < IWORDS; i++) u_imem.mem[i] = (i < prog.size()) ? prog[i] : NOP;
    for (int i = 0; i < DWORDS; i++) begin M[i] = $urandom; u_dmem.mem[i] = M[i]; end
    for (int r = 0; r < 32; r++) R[r] = 0;
    for (int r = 1; r < 32; r++) begin R[r] = $urandom; dut.u_rf.regs[r] = R[r]; end
    iss_run(halt_idx);
    repeat (3) @(negedge clk);
    rst = 0;
    ncyc = trace.size();
    for (int c = 0; c < ncyc; c++) begin
      fetch.push_back(imem_addr);
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    rst = 1;
    for (int c = 0; c < ncyc; c++)
      chk(fetch[c] == trace[c], $sformatf("%s cycle %0d fetch %h exp %h", name, c, fetch[c], trace[c]));
    for (int r = 1; r < 32; r++)
      chk(dut.u_rf.regs[r] == R[r], $sformatf("%s reg %0d = %h exp %h", name, r, dut.u_rf.regs[r], R[r]));
    for (int i = 0; i < DWORDS; i++)
      chk(u_dmem.mem[i] == M[i], $sformatf("%s mem[%0d] = %h exp %h", name, i, u_dmem.mem[i], M[i]));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h;
    rst = 1;
    gen_directed(h);
    run_and_compare(h, "directed");
    // values worked out by hand for the directed program
    chk(dut.u_rf.regs[3] == 12,  "forwarded add");
    chk(dut.u_rf.regs[4] == 7,   "forwarded sub");
    chk(u_dmem.mem[0] == 7,      "forwarded store data");
    chk(dut.u_rf.regs[6] == 100, "load delay slot sees old value");
    chk(dut.u_rf.regs[7] == 7,   "value after load delay slot");
    chk(dut.u_rf.regs[8] == 1,   "branch delay slot executed");
    chk(dut.u_rf.regs[11] == 3,  "jal delay slot executed");
    chk(dut.u_rf.regs[12] == 4,  "jr delay slot executed");
    chk(dut.u_rf.regs[31] == 56, "jal links PC+8");
    chk(dut.u_rf.regs[14] == 9,  "jr (forwarded target) delay slot executed");
    chk(trace.size() == 19,      "directed program: 19 instructions to the halt");
    for (int p = 0; p < NPROG; p++) begin
      gen_random(PLEN, h);
      run_and_compare(h, $sformatf("random%0d", p));
    end
    $display("forwarded=%0d load_delay_slot_reads=%0d taken_branches=%0d", n_fwd, n_load_slot, n_taken);
    chk(n_fwd > 0, "forwarding happened");
    chk(n_load_slot > 0, "load delay slot read happened");
    chk(n_taken > 0, "taken branch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
