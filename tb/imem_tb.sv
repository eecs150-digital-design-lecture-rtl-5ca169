// imem_tb: self-checking test of the instruction memory. Fills the array,
// then checks that each address appears in `rdata` exactly one clock edge
// after it is presented (the instruction-register timing), that the low two
// address bits are ignored and that `en` low holds the output.
module imem_tb;
  localparam int WORDS = 256;
  logic        clk = 0, en;
  logic [31:0] addr, rdata;
  logic [31:0] img [WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.clk, .en, .addr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      img[i] = $urandom;
      dut.mem[i] = img[i];
    end
    en = 1; addr = 0;
    repeat (2000) begin
      int w;
      logic [31:0] held;
      w = $urandom_range(WORDS - 1);
      @(negedge clk);
      held = rdata;
      addr = {22'd0, 8'(w), 2'($urandom)};
      en = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL output changed before the edge"); end
      @(posedge clk); #1;
      checks++;
      if (rdata !== (en ? img[w] : held)) begin
        failures++;
        $display("FAIL addr=%h en=%b rdata=%h exp=%h", addr, en, rdata, en ? img[w] : held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
