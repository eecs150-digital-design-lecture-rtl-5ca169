// regfile_tb: self-checking test of the register file. Random writes and
// reads on both ports against a shadow array; checks that $0 always reads
// zero and that a value written on a clock edge is readable right after it.
module regfile_tb;
  logic        clk = 0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    // fill every register first
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; wa = 5'(r); wd = $urandom;
      shadow[r] = (r == 0) ? 32'd0 : wd;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); ra2 = 5'(31 - r); #1;
      chk(rd1, shadow[r], "port1");
      chk(rd2, shadow[31 - r], "port2");
    end
    repeat (2000) begin
      @(negedge clk);
      we = $urandom_range(1); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = wa;
      #1;
      chk(rd1, shadow[ra1], "rand port1 before edge");
      chk(rd2, shadow[ra2], "rand port2 before edge");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
      chk(rd2, shadow[ra2], "read after write edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
