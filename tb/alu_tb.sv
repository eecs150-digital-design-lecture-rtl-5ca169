// alu_tb: self-checking test of the ALU. Drives every operation with
// directed corner values and random operands and compares the result and
// the zero flag with a reference written independently in this file.
module alu_tb;
  import mips150_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .zero);

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return 32'(x + z);
      ALU_SUB:  return 32'(x + ~z + 1);
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return ({1'b0, x} < {1'b0, z}) ? 32'd1 : 32'd0;
      ALU_SLL:  begin logic [31:0] r = z; repeat (x[4:0]) r = {r[30:0], 1'b0}; return r; end
      ALU_SRL:  begin logic [31:0] r = z; repeat (x[4:0]) r = {1'b0, r[31:1]}; return r; end
      ALU_SRA:  begin logic [31:0] r = z; repeat (x[4:0]) r = {r[31], r[31:1]}; return r; end
      ALU_LUI:  return {z[15:0], 16'h0000};
      default:  return 32'd0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_y(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h zero=%b", o.name(), x, z, y, e, zero);
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
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_001F};
    for (int o = 0; o <= int'(ALU_LUI); o++)
      foreach (corner[i]) foreach (corner[j]) check(alu_op_e'(o), corner[i], corner[j]);
    repeat (3000) check(alu_op_e'($urandom_range(int'(ALU_LUI))), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
